// aes_cipher_pipe: fully unrolled, fully pipelined AES-128 cipher.
//
// Stage 0 registers the input block XORed with round key 0; stages 1..10 are
// aes_round instances, the tenth without MixColumns. INVERSE = 0 encrypts
// with the forward round keys; INVERSE = 1 decrypts with the decryption key
// set of aes_key_expand (k10, InvMixColumns(k9) .. InvMixColumns(k1), k0).
// A block is accepted on every clock with in_valid high and leaves
// LATENCY = NR + 1 = 11 clocks later with out_valid high, together with the
// TAG_W-bit tag it entered with. There is no back-pressure: the caller must
// have room for every result. The keys must stay stable while blocks are in
// flight.
module aes_cipher_pipe
  import aes_pkg::*;
#(
  parameter bit          INVERSE = 1'b0,
  parameter int unsigned TAG_W   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  block_t            in_block,
  input  logic [TAG_W-1:0]  in_tag,
  input  round_keys_t       round_keys,
  output logic              out_valid,
  output block_t            out_block,
  output logic [TAG_W-1:0]  out_tag
);

  logic   [NR:0] stage_valid;
  block_t [NR:0] stage_data;
  logic   [NR:0][TAG_W-1:0] stage_tag;
  block_t        init_xor;

  // Initial AddRoundKey, registered.
  aes_add_round_key u_ark0 (.din(in_block), .round_key(round_keys[0]), .dout(init_xor));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage_valid[0] <= 1'b0;
    else        stage_valid[0] <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) stage_data[0] <= init_xor;
  end

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.INVERSE(INVERSE), .FINAL(r == NR)) u_round (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (stage_valid[r-1]),
      .din       (stage_data[r-1]),
      .round_key (round_keys[r]),
      .out_valid (stage_valid[r]),
      .dout      (stage_data[r])
    );
  end

  // The tag travels alongside the data.
  always_ff @(posedge clk) begin
    stage_tag[0] <= in_tag;
    for (int r = 1; r <= NR; r++) stage_tag[r] <= stage_tag[r-1];
  end

  assign out_valid = stage_valid[NR];
  assign out_block = stage_data[NR];
  assign out_tag   = stage_tag[NR];

endmodule
