// tb_uart_tx: sends random bytes, some back to back, and decodes the line
// independently: it waits for each falling edge, checks the start bit, samples
// each bit at its middle, checks the stop bit, and checks that a frame lasts
// exactly 10 bit times and that in_ready is low while a frame is on the line.
module tb_uart_tx;
  import aes_pkg::*;

  localparam int CPB = 20;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, txd;
  byte_t in_byte;
  byte_t sent [$];

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_byte, .txd);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Line decoder.
  int received = 0;
  initial begin
    forever begin
      byte_t b;
      longint t0;
      @(negedge txd);
      t0 = longint'($time);
      repeat (CPB / 2) @(posedge clk);
      check("start bit", 128'(txd), 128'd0);
      check("busy during frame", 128'(in_ready), 128'd0);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check("stop bit", 128'(txd), 128'd1);
      if (sent.size() == 0) begin checks++; failures++; $display("FAIL unexpected frame"); end
      else check("byte", 128'(b), 128'(sent.pop_front()));
      @(posedge in_ready);
      check("frame length", 128'(unsigned'(int'((longint'($time) - t0) / 10))), 128'(10 * CPB));
      received++;
    end
  end

  initial begin
    in_valid = 0; in_byte = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check("idle line high", 128'(txd), 128'd1);
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      in_valid = 1; in_byte = byte_t'($urandom);
      while (!in_ready) @(negedge clk);
      sent.push_back(in_byte);
      @(negedge clk);
      in_valid = 0;
      if (n % 3 == 0) repeat ($urandom_range(1, 3 * CPB)) @(negedge clk);
    end
    wait (received == 40);
    check("all frames", 128'(sent.size()), 128'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
