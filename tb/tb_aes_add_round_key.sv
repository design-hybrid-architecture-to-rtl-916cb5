// tb_aes_add_round_key: checks the XOR of state and round key on the first
// step of the FIPS-197 Appendix B example and on random values.
module tb_aes_add_round_key;
  import aes_pkg::*;

  int checks = 0, failures = 0;
  block_t din, key, dout;

  aes_add_round_key dut (.din(din), .round_key(key), .dout(dout));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    check("FIPS-197 B round 0", dout, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] exp;
      din = aes_ref_pkg::rand128();
      key = aes_ref_pkg::rand128();
      for (int i = 0; i < 128; i++) exp[i] = (din[i] != key[i]);
      #1;
      check("random", dout, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
