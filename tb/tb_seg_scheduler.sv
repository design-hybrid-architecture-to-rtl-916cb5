// tb_seg_scheduler: surrounds the scheduler with a model of its two source
// and two destination buffers (sources fill and destinations drain after
// random delays) and checks every clock that: nothing starts before the keys
// are ready or towards a busy destination or from an empty source; a start
// claims the destination and is followed by exactly NBEATS beats 0..NBEATS-1
// of the same mode, with the source released on the last one; when both
// directions are ready the mode alternates. Also counts stalls and mode
// switches, which must both occur.
module tb_seg_scheduler;
  import aes_pkg::*;

  localparam int NBEATS = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic keys_ready, enc_src_full, dec_src_full, enc_dst_free, dec_dst_free;
  logic issue_valid, enc_src_release, dec_src_release, enc_dst_reserve, dec_dst_reserve, stall, mode_switch;
  aes_mode_e issue_mode;
  logic [0:0] issue_beat;

  always #5 clk = ~clk;

  seg_scheduler #(.NBEATS(NBEATS)) dut (
    .clk, .rst_n, .keys_ready, .enc_src_full, .dec_src_full, .enc_dst_free, .dec_dst_free,
    .issue_valid, .issue_mode, .issue_beat, .enc_src_release, .dec_src_release,
    .enc_dst_reserve, .dec_dst_reserve, .stall, .mode_switch);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Environment: delays until a source refills / a destination drains.
  int enc_fill_t, dec_fill_t, enc_drain_t, dec_drain_t;
  int stalls = 0, switches = 0, segments = 0, both_ready_picks = 0;
  int beats_left = 0, exp_beat = 0;
  aes_mode_e seg_mode, last_mode;
  bit have_last = 0;

  // Checks, sampled just before the rising edge.
  always @(negedge clk) if (rst_n) begin
    logic enc_ok, dec_ok;
    enc_ok = keys_ready && enc_src_full && enc_dst_free;
    dec_ok = keys_ready && dec_src_full && dec_dst_free;
    if (stall) stalls++;
    if (mode_switch) switches++;
    // an issue beat in progress
    if (beats_left > 0) begin
      check("issue valid", 128'(issue_valid), 128'd1);
      check("issue mode", 128'(issue_mode), 128'(seg_mode));
      check("issue beat", 128'(issue_beat), 128'(exp_beat));
      check("enc release", 128'(enc_src_release), 128'(beats_left == 1 && seg_mode == MODE_ENC));
      check("dec release", 128'(dec_src_release), 128'(beats_left == 1 && seg_mode == MODE_DEC));
      exp_beat++;
      beats_left--;
    end else begin
      check("idle", 128'({issue_valid, enc_src_release, dec_src_release}), 128'd0);
    end
    if (enc_dst_reserve || dec_dst_reserve) begin
      aes_mode_e m;
      m = enc_dst_reserve ? MODE_ENC : MODE_DEC;
      check("one reserve", 128'(enc_dst_reserve && dec_dst_reserve), 128'd0);
      check("start allowed", 128'(m == MODE_ENC ? enc_ok : dec_ok), 128'd1);
      if (enc_ok && dec_ok && have_last && !(beats_left > 0)) begin
        both_ready_picks++;
        check("alternate", 128'(m != last_mode), 128'd1);
      end
      check("previous segment ends", 128'(beats_left), 128'd0);
      check("mode_switch flag", 128'(mode_switch), 128'(have_last && m != last_mode));
      seg_mode = m; last_mode = m; have_last = 1;
      beats_left = NBEATS; exp_beat = 0;
      segments++;
    end else begin
      if (beats_left == 0 && (enc_ok || dec_ok)) begin
        checks++; failures++; $display("FAIL ready segment not started t=%0t", $time);
      end
    end
  end

  // Environment model, updated at the rising edge.
  always @(posedge clk) if (rst_n) begin
    if (enc_src_release) begin enc_src_full <= 0; enc_fill_t <= $urandom_range(1, 20); end
    else if (!enc_src_full) begin if (enc_fill_t == 0) enc_src_full <= 1; else enc_fill_t <= enc_fill_t - 1; end
    if (dec_src_release) begin dec_src_full <= 0; dec_fill_t <= $urandom_range(1, 20); end
    else if (!dec_src_full) begin if (dec_fill_t == 0) dec_src_full <= 1; else dec_fill_t <= dec_fill_t - 1; end
    if (enc_dst_reserve) begin enc_dst_free <= 0; enc_drain_t <= $urandom_range(1, 40); end
    else if (!enc_dst_free) begin if (enc_drain_t == 0) enc_dst_free <= 1; else enc_drain_t <= enc_drain_t - 1; end
    if (dec_dst_reserve) begin dec_dst_free <= 0; dec_drain_t <= $urandom_range(1, 40); end
    else if (!dec_dst_free) begin if (dec_drain_t == 0) dec_dst_free <= 1; else dec_drain_t <= dec_drain_t - 1; end
  end

  initial begin
    keys_ready = 0;
    enc_src_full = 1; dec_src_full = 1; enc_dst_free = 1; dec_dst_free = 1;
    enc_fill_t = 0; dec_fill_t = 0; enc_drain_t = 0; dec_drain_t = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);    // keys not ready: nothing may start
    check("nothing before keys", 128'(segments), 128'd0);
    @(negedge clk);
    keys_ready = 1;
    repeat (5000) @(posedge clk);
    @(negedge clk);
    checks++; if (segments < 100)        begin failures++; $display("FAIL too few segments %0d", segments); end
    checks++; if (stalls == 0)           begin failures++; $display("FAIL no stall seen"); end
    checks++; if (switches == 0)         begin failures++; $display("FAIL no mode switch seen"); end
    checks++; if (both_ready_picks == 0) begin failures++; $display("FAIL no contended pick seen"); end
    $display("segments=%0d stalls=%0d switches=%0d contended=%0d", segments, stalls, switches, both_ready_picks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
