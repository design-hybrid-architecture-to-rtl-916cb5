// tb_aes_round: checks one registered round in its four forms (encryption or
// decryption, middle or final round) against the reference model, with a new
// input every clock and a one-clock latency on data and valid.
module tb_aes_round;
  import aes_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic   in_valid;
  block_t din, key;
  logic   [3:0] ov;
  block_t [3:0] dout;

  always #5 clk = ~clk;

  aes_round #(.INVERSE(1'b0), .FINAL(1'b0)) dut0 (.clk, .rst_n, .in_valid, .din, .round_key(key), .out_valid(ov[0]), .dout(dout[0]));
  aes_round #(.INVERSE(1'b0), .FINAL(1'b1)) dut1 (.clk, .rst_n, .in_valid, .din, .round_key(key), .out_valid(ov[1]), .dout(dout[1]));
  aes_round #(.INVERSE(1'b1), .FINAL(1'b0)) dut2 (.clk, .rst_n, .in_valid, .din, .round_key(key), .out_valid(ov[2]), .dout(dout[2]));
  aes_round #(.INVERSE(1'b1), .FINAL(1'b1)) dut3 (.clk, .rst_n, .in_valid, .din, .round_key(key), .out_valid(ov[3]), .dout(dout[3]));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [127:0] model(int form, logic [127:0] s, logic [127:0] k);
    aes_ref_pkg::state_t st = aes_ref_pkg::to_state(s);
    bit inv = (form >= 2);
    st = aes_ref_pkg::shift(aes_ref_pkg::sub(st, inv), inv);
    if (form % 2 == 0) st = aes_ref_pkg::mix(st, inv);
    return aes_ref_pkg::from_state(st) ^ k;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pdin, pkey;
    aes_ref_pkg::init();
    in_valid = 0; din = '0; key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // FIPS-197 Appendix B, round 1: start of round 193de3be.. with key a0fafe17..
    @(negedge clk);
    in_valid = 1;
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    key = 128'ha0fafe1788542cb123a339392a6c7605;
    @(negedge clk);
    check("valid after one clock", 128'(ov), 128'hf);
    check("FIPS-197 B round 1", dout[0], 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int n = 0; n < 100; n++) begin
      din = aes_ref_pkg::rand128();
      key = aes_ref_pkg::rand128();
      pdin = din; pkey = key;
      @(negedge clk);
      for (int f = 0; f < 4; f++) check($sformatf("form %0d", f), dout[f], model(f, pdin, pkey));
    end
    in_valid = 0;
    @(negedge clk);
    @(negedge clk);
    check("valid drops", 128'(ov), 128'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
