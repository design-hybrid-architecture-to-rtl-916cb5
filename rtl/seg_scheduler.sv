// seg_scheduler: control of the processing engines, one segment at a time.
//
// Two sources can hold a full segment: the image to be encrypted and the
// received data to be decrypted. A segment may start once the round keys are
// ready, its source buffer is full and its destination buffer is free. The
// scheduler then claims the destination (reserve pulse), issues the NBEATS
// beats of the segment on consecutive clocks to all engines at once with the
// segment's mode, and releases the source on the last beat. When both modes
// are ready it alternates between them, so neither direction starves; a new
// segment may start on the clock after the previous one's last beat.
// stall is high while a full source waits for its destination;
// mode_switch pulses when a segment starts in the other mode than the one
// before it. Both are status outputs only.
module seg_scheduler
  import aes_pkg::*;
#(
  parameter int unsigned NBEATS = 2,
  localparam int unsigned BEAT_W = (NBEATS > 1) ? $clog2(NBEATS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              keys_ready,
  input  logic              enc_src_full,
  input  logic              dec_src_full,
  input  logic              enc_dst_free,
  input  logic              dec_dst_free,
  output logic              issue_valid,
  output aes_mode_e         issue_mode,
  output logic [BEAT_W-1:0] issue_beat,
  output logic              enc_src_release,
  output logic              dec_src_release,
  output logic              enc_dst_reserve,
  output logic              dec_dst_reserve,
  output logic              stall,
  output logic              mode_switch
);

  logic              busy;
  aes_mode_e         cur_mode, last_mode;
  logic [BEAT_W-1:0] beat;
  logic              last_beat, can_pick, enc_ok, dec_ok, start;
  aes_mode_e         pick_mode;

  assign last_beat = busy && (beat == BEAT_W'(NBEATS - 1));
  assign can_pick  = !busy || last_beat;
  // A source being released this clock is not offered again.
  assign enc_ok    = keys_ready && enc_src_full && enc_dst_free && !(busy && cur_mode == MODE_ENC);
  assign dec_ok    = keys_ready && dec_src_full && dec_dst_free && !(busy && cur_mode == MODE_DEC);
  assign start     = can_pick && (enc_ok || dec_ok);

  always_comb begin
    if (enc_ok && dec_ok) pick_mode = (last_mode == MODE_ENC) ? MODE_DEC : MODE_ENC;
    else if (dec_ok)      pick_mode = MODE_DEC;
    else                  pick_mode = MODE_ENC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      beat      <= '0;
      cur_mode  <= MODE_ENC;
      last_mode <= MODE_DEC;
    end else if (start) begin
      busy      <= 1'b1;
      beat      <= '0;
      cur_mode  <= pick_mode;
      last_mode <= pick_mode;
    end else if (last_beat) begin
      busy <= 1'b0;
    end else if (busy) begin
      beat <= beat + 1'b1;
    end
  end

  // Track whether any segment has run, so the first one is not a "switch".
  logic started_once;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     started_once <= 1'b0;
    else if (start) started_once <= 1'b1;
  end

  assign issue_valid     = busy;
  assign issue_mode      = cur_mode;
  assign issue_beat      = beat;
  assign enc_src_release = last_beat && cur_mode == MODE_ENC;
  assign dec_src_release = last_beat && cur_mode == MODE_DEC;
  assign enc_dst_reserve = start && pick_mode == MODE_ENC;
  assign dec_dst_reserve = start && pick_mode == MODE_DEC;
  assign stall           = keys_ready && ((enc_src_full && !enc_dst_free) || (dec_src_full && !dec_dst_free));
  assign mode_switch     = start && started_once && pick_mode != last_mode;

endmodule
