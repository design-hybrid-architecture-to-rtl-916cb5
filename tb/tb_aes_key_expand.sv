// tb_aes_key_expand: loads the FIPS-197 Appendix A.1 key and random keys,
// checks that key_ready rises exactly 10 clocks after key_load, that all
// eleven encryption round keys match the reference schedule (including the
// published last key d014f9a8 c9ee2589 e13f0cc8 b6630ca6), and that the
// decryption keys are k10, InvMixColumns(k9..k1), k0.
module tb_aes_key_expand;
  import aes_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic        key_load, key_ready;
  block_t      key;
  round_keys_t enc_keys, dec_keys;

  always #5 clk = ~clk;

  aes_key_expand dut (.clk, .rst_n, .key_load, .key, .key_ready, .enc_keys, .dec_keys);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_and_check(logic [127:0] k);
    logic [127:0] rk [11];
    int cycles = 0;
    aes_ref_pkg::expand(k, rk);
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    while (!key_ready && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check("key_ready latency", 128'(cycles), 128'd10);
    for (int r = 0; r <= 10; r++) check($sformatf("enc key %0d", r), enc_keys[r], rk[r]);
    check("dec key 0", dec_keys[0], rk[10]);
    check("dec key 10", dec_keys[10], rk[0]);
    for (int r = 1; r < 10; r++)
      check($sformatf("dec key %0d", r), dec_keys[r],
            aes_ref_pkg::from_state(aes_ref_pkg::mix(aes_ref_pkg::to_state(rk[10 - r]), 1)));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aes_ref_pkg::init();
    key_load = 0; key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check("not ready after reset", 128'(key_ready), 128'd0);
    load_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check("FIPS-197 A.1 k10", enc_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int n = 0; n < 20; n++) load_and_check(aes_ref_pkg::rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
