// aes_shift_rows: the ShiftRows step (or InvShiftRows when INVERSE = 1).
//
// Row 0 of the 4x4 state is left alone; rows 1, 2 and 3 are rotated left by
// 1, 2 and 3 bytes (rotated right for the inverse). State byte i is row i % 4,
// column i / 4, so the step is only wiring. Combinational.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t din,
  output block_t dout
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // forward: out(r,c) = in(r, c+r); inverse: out(r,c) = in(r, c-r)
        automatic int src_c = INVERSE ? ((c + 4 - r) % 4) : ((c + r) % 4);
        dout[127 - 8*(4*c + r) -: 8] = get_byte(din, 4*src_c + r);
      end
    end
  end

endmodule
