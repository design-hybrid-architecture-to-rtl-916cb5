// processing_engine: one AES-128 processing engine (PE).
//
// The engine holds an encryption pipeline and a decryption pipeline
// (aes_cipher_pipe). Each clock it may take one 128-bit block; in_mode sends
// it to the encryption or the decryption pipeline. Both pipelines have the
// same latency of 11 clocks, so results leave in the order blocks came in,
// even when the mode changes from one block to the next, and at most one
// pipeline delivers a result in any clock. Throughput is one block per clock
// per engine. The round keys are shared with the other engines and come from
// aes_key_expand. The tag (TAG_W bits) rides along with each block so the
// caller can tell where the result belongs.
module processing_engine
  import aes_pkg::*;
#(
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  aes_mode_e        in_mode,
  input  block_t           in_block,
  input  logic [TAG_W-1:0] in_tag,
  input  round_keys_t      enc_keys,
  input  round_keys_t      dec_keys,
  output logic             out_valid,
  output aes_mode_e        out_mode,
  output block_t           out_block,
  output logic [TAG_W-1:0] out_tag
);

  logic             enc_valid, dec_valid;
  block_t           enc_block, dec_block;
  logic [TAG_W-1:0] enc_tag, dec_tag;

  aes_cipher_pipe #(.INVERSE(1'b0), .TAG_W(TAG_W)) u_enc (
    .clk, .rst_n,
    .in_valid   (in_valid && in_mode == MODE_ENC),
    .in_block, .in_tag,
    .round_keys (enc_keys),
    .out_valid  (enc_valid),
    .out_block  (enc_block),
    .out_tag    (enc_tag)
  );

  aes_cipher_pipe #(.INVERSE(1'b1), .TAG_W(TAG_W)) u_dec (
    .clk, .rst_n,
    .in_valid   (in_valid && in_mode == MODE_DEC),
    .in_block, .in_tag,
    .round_keys (dec_keys),
    .out_valid  (dec_valid),
    .out_block  (dec_block),
    .out_tag    (dec_tag)
  );

  assign out_valid = enc_valid | dec_valid;
  assign out_mode  = dec_valid ? MODE_DEC : MODE_ENC;
  assign out_block = dec_valid ? dec_block : enc_block;
  assign out_tag   = dec_valid ? dec_tag   : enc_tag;

  // Equal latencies mean the two pipelines never finish in the same clock.
  a_one_result : assert property (@(posedge clk) disable iff (!rst_n) !(enc_valid && dec_valid));

endmodule
