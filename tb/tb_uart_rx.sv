// tb_uart_rx: drives serial frames onto rxd with the testbench's own timing,
// back to back and with idle gaps, including a short glitch on the idle line
// and frames with a broken stop bit. Checks each received byte, that a good
// frame gives exactly one out_valid pulse and a bad one a frame_err pulse.
module tb_uart_rx;
  import aes_pkg::*;

  localparam int CPB = 20;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rxd, out_valid, frame_err;
  byte_t out_byte;
  byte_t exp_q [$];
  int errs_exp = 0, errs_seen = 0, good_seen = 0;

  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .out_valid, .out_byte, .frame_err);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic send(byte_t b, bit good_stop);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = good_stop; repeat (CPB) @(posedge clk);
    rxd = 1;
    if (!good_stop) repeat (2 * CPB) @(posedge clk);   // let the receiver resync
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      good_seen++;
      if (exp_q.size() == 0) begin checks++; failures++; $display("FAIL unexpected byte"); end
      else check("byte", 128'(out_byte), 128'(exp_q.pop_front()));
    end
    if (frame_err) errs_seen++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rxd = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // glitch shorter than half a bit: must be ignored
    rxd = 0; repeat (CPB / 4) @(posedge clk); rxd = 1;
    repeat (2 * CPB) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      byte_t b;
      bit good;
      b = byte_t'($urandom);
      good = (n % 10 != 7);
      if (good) exp_q.push_back(b); else errs_exp++;
      send(b, good);
      if (n % 4 == 0) repeat ($urandom_range(1, 3 * CPB)) @(posedge clk);
    end
    repeat (2 * CPB) @(posedge clk);
    check("all bytes received", 128'(exp_q.size()), 128'd0);
    check("good frames", 128'(good_seen), 128'(60 - errs_exp));
    check("frame errors", 128'(errs_seen), 128'(errs_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
