// tb_seg_unpacker: reserves the buffer, writes the beats of a segment in a
// random order, then drains it with a randomly stalling consumer. Checks the
// free flag through the cycle, the byte order of the output, that output
// only starts once every beat is in, and that the buffer is free after the
// last byte.
module tb_seg_unpacker;
  import aes_pkg::*;

  localparam int SEG = 128, LANES = 4, NBEATS = SEG / 16 / LANES;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic free, reserve, wr_en, out_valid, out_ready;
  logic [0:0] wr_beat;
  block_t [LANES-1:0] wr_blocks;
  byte_t out_byte;

  always #5 clk = ~clk;

  seg_unpacker #(.SEG_BYTES(SEG), .LANES(LANES)) dut (
    .clk, .rst_n, .free, .reserve, .wr_en, .wr_beat, .wr_blocks, .out_valid, .out_ready, .out_byte);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t blocks [SEG/16];
    int got;
    reserve = 0; wr_en = 0; wr_beat = '0; wr_blocks = '0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      @(negedge clk);
      check("free when idle", 128'({free, out_valid}), 128'b10);
      for (int i = 0; i < SEG/16; i++) blocks[i] = aes_ref_pkg::rand128();
      reserve = 1;
      @(negedge clk);
      reserve = 0;
      check("claimed", 128'(free), 128'd0);
      repeat ($urandom_range(0, 12)) @(negedge clk);
      for (int b = 0; b < NBEATS; b++) begin
        int beat;
        beat = (s % 2 == 1) ? (NBEATS - 1 - b) : b;   // odd segments: reverse order
        check("no output before all beats", 128'(out_valid), 128'd0);
        wr_en = 1; wr_beat = 1'(beat);
        for (int l = 0; l < LANES; l++) wr_blocks[l] = blocks[beat*LANES + l];
        @(negedge clk);
        wr_en = 0;
      end
      got = 0;
      while (got < SEG) begin
        out_ready = ($urandom_range(0, 2) != 0);
        #1;
        if (out_ready) begin
          check("output valid", 128'(out_valid), 128'd1);
          check($sformatf("seg %0d byte %0d", s, got), 128'(out_byte), 128'(blocks[got/16][127-8*(got%16) -: 8]));
          got++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      check("free after drain", 128'({free, out_valid}), 128'b10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
