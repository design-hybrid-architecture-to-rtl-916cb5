// aes_key_expand: AES-128 key schedule with on-chip storage of all round keys.
//
// A pulse on key_load captures the 128-bit cipher key as round key 0; each of
// the next 10 clocks derives one further round key from the previous one
// (RotWord, SubWord, XOR with the round constant, then the chained XOR of the
// four words). key_ready rises on the clock after round key 10 is written, 10
// clocks after key_load, and stays high until the next key_load.
// enc_keys holds k0..k10 in the order the encryption pipeline uses them.
// dec_keys holds k10, InvMixColumns(k9) .. InvMixColumns(k1), k0: the order
// and form the decryption pipeline needs, since its rounds apply
// InvMixColumns before AddRoundKey. One key schedule is shared by all the
// processing engines; the keys are held, not recomputed per block.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  block_t      key,
  output logic        key_ready,
  output round_keys_t enc_keys,
  output round_keys_t dec_keys
);

  round_keys_t rk_q;
  logic [3:0]  round_q;     // round key being generated, 1..10
  byte_t       rcon_q;
  logic        busy_q;
  block_t      prev_key, next_key;

  assign prev_key = rk_q[round_q - 4'd1];

  // One step of the schedule.
  always_comb begin
    logic [31:0] w0, w1, w2, w3, t;
    w0 = prev_key[127:96];
    w1 = prev_key[95:64];
    w2 = prev_key[63:32];
    w3 = prev_key[31:0];
    t  = {SBOX[w3[23:16]], SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    t[31:24] = t[31:24] ^ rcon_q;
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    next_key = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      key_ready <= 1'b0;
      round_q   <= 4'd1;
      rcon_q    <= 8'h01;
      rk_q      <= '0;
    end else if (key_load) begin
      busy_q    <= 1'b1;
      key_ready <= 1'b0;
      round_q   <= 4'd1;
      rcon_q    <= 8'h01;
      rk_q[0]   <= key;
    end else if (busy_q) begin
      rk_q[round_q] <= next_key;
      rcon_q        <= xtime(rcon_q);
      if (round_q == 4'(NR)) begin
        busy_q    <= 1'b0;
        key_ready <= 1'b1;
      end else begin
        round_q <= round_q + 4'd1;
      end
    end
  end

  assign enc_keys = rk_q;

  assign dec_keys[0]  = rk_q[NR];
  assign dec_keys[NR] = rk_q[0];
  for (genvar r = 1; r < NR; r++) begin : g_dec_key
    aes_mix_columns #(.INVERSE(1'b1)) u_imix (.din(rk_q[NR - r]), .dout(dec_keys[r]));
  end

endmodule
