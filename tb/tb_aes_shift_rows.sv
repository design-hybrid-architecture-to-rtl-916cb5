// tb_aes_shift_rows: checks ShiftRows and InvShiftRows on a labelled state
// (byte i holds i, so every byte's destination is visible) and on random
// states against the reference model.
module tb_aes_shift_rows;
  import aes_pkg::*;

  int checks = 0, failures = 0;
  block_t din, fwd, back;

  aes_shift_rows #(.INVERSE(1'b0)) dut_fwd (.din(din), .dout(fwd));
  aes_shift_rows #(.INVERSE(1'b1)) dut_inv (.din(fwd), .dout(back));

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
    din = 128'h000102030405060708090a0b0c0d0e0f;
    #1;
    // Row r rotated left by r: columns read 0 5 a f / 4 9 e 3 / 8 d 2 7 / c 1 6 b.
    check("labelled", fwd, 128'h00050a0f04090e03080d02070c01060b);
    check("labelled inverse", back, din);
    for (int n = 0; n < 200; n++) begin
      din = aes_ref_pkg::rand128();
      #1;
      check("random", fwd, aes_ref_pkg::from_state(aes_ref_pkg::shift(aes_ref_pkg::to_state(din), 0)));
      check("random inverse", back, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
