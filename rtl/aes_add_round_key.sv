// aes_add_round_key: the AddRoundKey step.
//
// The 16 state bytes, taken as one 128-bit word, are XORed with the 128-bit
// round key. The same step serves encryption and decryption. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t din,
  input  block_t round_key,
  output block_t dout
);

  assign dout = din ^ round_key;

endmodule
