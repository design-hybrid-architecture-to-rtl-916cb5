// aes_sub_bytes: the SubBytes step (or InvSubBytes when INVERSE = 1).
//
// Each of the 16 state bytes is replaced through the S-box: the high nibble
// picks the row and the low nibble the column of the 16x16 table, which is
// the multiplicative inverse in GF(2^8) followed by the AES affine map. The
// tables come from aes_pkg, where they are computed at elaboration. Purely
// combinational: dout follows din in the same cycle.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t din,
  output block_t dout
);

  localparam sbox_t TABLE = INVERSE ? INV_SBOX : SBOX;

  for (genvar i = 0; i < 16; i++) begin : g_byte
    assign dout[127 - 8*i -: 8] = TABLE[din[127 - 8*i -: 8]];
  end

endmodule
