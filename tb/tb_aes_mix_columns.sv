// tb_aes_mix_columns: checks MixColumns and InvMixColumns on the well-known
// column db 13 53 45 -> 8e 4d a1 bc and f2 0a 22 5c -> 9f dc 58 9d, on random
// states against the reference model, and that the inverse undoes the
// forward step.
module tb_aes_mix_columns;
  import aes_pkg::*;

  int checks = 0, failures = 0;
  block_t din, fwd, back;

  aes_mix_columns #(.INVERSE(1'b0)) dut_fwd (.din(din), .dout(fwd));
  aes_mix_columns #(.INVERSE(1'b1)) dut_inv (.din(fwd), .dout(back));

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
    aes_ref_pkg::init();
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6;
    #1;
    check("known columns", fwd, 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6);
    check("known inverse", back, din);
    for (int n = 0; n < 200; n++) begin
      din = aes_ref_pkg::rand128();
      #1;
      check("random", fwd, aes_ref_pkg::from_state(aes_ref_pkg::mix(aes_ref_pkg::to_state(din), 0)));
      check("random inverse", back, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
