// aes_mix_columns: the MixColumns step (or InvMixColumns when INVERSE = 1).
//
// Each 4-byte column is treated as a polynomial over GF(2^8) and multiplied
// modulo x^4 + 1 by c(x) = {03}x^3 + {01}x^2 + {01}x + {02}; the inverse uses
// {0b}x^3 + {0d}x^2 + {09}x + {0e}. In matrix form the coefficients of row 0
// are (2,3,1,1) or (e,b,d,9), and every further row is the previous one
// rotated right by one. Combinational.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t din,
  output block_t dout
);

  localparam byte_t C0 = INVERSE ? 8'h0e : 8'h02;
  localparam byte_t C1 = INVERSE ? 8'h0b : 8'h03;
  localparam byte_t C2 = INVERSE ? 8'h0d : 8'h01;
  localparam byte_t C3 = INVERSE ? 8'h09 : 8'h01;

  // Product of a byte and a constant of at most four bits: the partial
  // products a*2, a*4 and a*8 come from repeated xtime.
  function automatic byte_t mul_const(byte_t a, logic [3:0] c);
    byte_t a2, a4, a8;
    a2 = xtime(a);
    a4 = xtime(a2);
    a8 = xtime(a4);
    return (c[0] ? a : 8'h00) ^ (c[1] ? a2 : 8'h00) ^ (c[2] ? a4 : 8'h00) ^ (c[3] ? a8 : 8'h00);
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = get_byte(din, 4*c + r);
      for (int r = 0; r < 4; r++) begin
        dout[127 - 8*(4*c + r) -: 8] = mul_const(a[r], C0[3:0])           ^ mul_const(a[(r + 1) % 4], C1[3:0])
                                     ^ mul_const(a[(r + 2) % 4], C2[3:0]) ^ mul_const(a[(r + 3) % 4], C3[3:0]);
      end
    end
  end

endmodule
