// aes_round: one registered AES round.
//
// Encryption (INVERSE = 0): SubBytes -> ShiftRows -> MixColumns -> AddRoundKey.
// Decryption (INVERSE = 1): InvSubBytes -> InvShiftRows -> InvMixColumns ->
// AddRoundKey, the same order with every step inverted. With that order the
// decryption round keys of the middle rounds must be passed through
// InvMixColumns beforehand (the "equivalent inverse cipher"); aes_key_expand
// supplies them. FINAL = 1 drops the MixColumns step, as in the last round.
// The result and a valid bit are registered: latency one clock, one new
// block accepted every clock. Only the valid bit is reset.
module aes_round
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0,
  parameter bit FINAL   = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t din,
  input  block_t round_key,
  output logic   out_valid,
  output block_t dout
);

  block_t after_sub, after_shift, after_mix, after_key;

  aes_sub_bytes  #(.INVERSE(INVERSE)) u_sub   (.din(din),         .dout(after_sub));
  aes_shift_rows #(.INVERSE(INVERSE)) u_shift (.din(after_sub),   .dout(after_shift));

  if (FINAL) begin : g_final
    assign after_mix = after_shift;
  end else begin : g_mix
    aes_mix_columns #(.INVERSE(INVERSE)) u_mix (.din(after_shift), .dout(after_mix));
  end

  aes_add_round_key u_ark (.din(after_mix), .round_key(round_key), .dout(after_key));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) dout <= after_key;
  end

endmodule
