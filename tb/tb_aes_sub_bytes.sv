// tb_aes_sub_bytes: checks SubBytes and InvSubBytes against the reference
// S-box, against known table entries (00->63, 53->ed, ff->16) and checks that
// the inverse undoes the forward step, on every byte value and random states.
module tb_aes_sub_bytes;
  import aes_pkg::*;

  int checks = 0, failures = 0;
  block_t din, fwd, back;

  aes_sub_bytes #(.INVERSE(1'b0)) dut_fwd (.din(din), .dout(fwd));
  aes_sub_bytes #(.INVERSE(1'b1)) dut_inv (.din(fwd), .dout(back));

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
    din = {8'h00, 8'h53, 8'hff, 8'h01, 96'h0};
    #1;
    check("known entries", 128'(fwd[127:96]), 128'h63_ed_16_7c);
    for (int v = 0; v < 256; v += 16) begin
      for (int i = 0; i < 16; i++) din[127-8*i -: 8] = 8'(v + i);
      #1;
      for (int i = 0; i < 16; i++) check("sbox", 128'(fwd[127-8*i -: 8]), 128'(aes_ref_pkg::sbox[v+i]));
      check("inverse", back, din);
    end
    for (int n = 0; n < 200; n++) begin
      din = aes_ref_pkg::rand128();
      #1;
      check("random", fwd, aes_ref_pkg::from_state(aes_ref_pkg::sub(aes_ref_pkg::to_state(din), 0)));
      check("random inverse", back, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
