// tb_seg_packer: streams random 128-byte segments in with random gaps, checks
// that in_ready drops exactly after the 128th byte, that every beat read back
// holds the bytes in stream order (byte 0 in bits [127:120] of block 0), and
// that release makes the buffer accept the next segment.
module tb_seg_packer;
  import aes_pkg::*;

  localparam int SEG = 128, LANES = 4, NBEATS = SEG / 16 / LANES;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, full, release_seg;
  byte_t in_byte;
  logic [0:0] rd_beat;
  block_t [LANES-1:0] rd_blocks;

  always #5 clk = ~clk;

  seg_packer #(.SEG_BYTES(SEG), .LANES(LANES)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_byte, .full, .rd_beat, .rd_blocks, .release_seg);

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
    byte_t seg [SEG];
    in_valid = 0; in_byte = '0; rd_beat = '0; release_seg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      @(negedge clk);
      check("empty before segment", 128'({full, in_ready}), 128'b01);
      for (int i = 0; i < SEG; i++) begin
        seg[i] = byte_t'($urandom);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_byte = seg[i];
        @(negedge clk);
        if (i < SEG - 1) check("still accepting", 128'(in_ready), 128'd1);
      end
      in_valid = 1; in_byte = 8'hee;   // offered but must not be taken
      @(negedge clk);
      in_valid = 0;
      check("full after 128 bytes", 128'({full, in_ready}), 128'b10);
      for (int b = 0; b < NBEATS; b++) begin
        rd_beat = 1'(b);
        #1;
        for (int l = 0; l < LANES; l++) begin
          logic [127:0] exp;
          for (int k = 0; k < 16; k++) exp[127-8*k -: 8] = seg[(b*LANES + l)*16 + k];
          check($sformatf("seg %0d beat %0d lane %0d", s, b, l), rd_blocks[l], exp);
        end
      end
      @(negedge clk);
      release_seg = 1;
      @(negedge clk);
      release_seg = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
