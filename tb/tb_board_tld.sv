// tb_board_tld: end-to-end run of the image link with two boards, both
// built from board_tld at its default parameters (four engines, 128-byte
// segments, 434 clocks per UART bit).
//
// Board A (the sending board) gets a small colour image, 8 x 8 RGB pixels
// padded from 192 to 256 bytes (two segments); board B gets a gray image of
// 16 x 8 pixels (128 bytes, one segment) so that both boards encrypt and
// decrypt at the same time. The serial lines are cross-connected, standing in
// for the radio link. Both boards load the same key.
//
// Checks:
//  * the bytes on A's serial line, decoded by the testbench, are the AES-128
//    ECB encryption of A's image, block by block (reference model);
//  * B's display stream equals A's image and A's display stream equals B's;
//  * no received byte is lost (rx_overrun) and no frame is broken;
//  * key_ready rises 10 clocks after key_load.
// Mechanisms that must occur at least once: a stalled segment waiting for its
// output buffer (sched_stall), a change of engine direction
// (sched_mode_switch) on each board, and back-pressure from B's display.
module tb_board_tld;
  import aes_pkg::*;

  localparam int CPB = 434;                  // board_tld default CLKS_PER_BIT
  localparam int A_BYTES = 256, B_BYTES = 128;
  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   key_load, a_key_ready, b_key_ready;
  logic   a_img_valid, a_img_ready, b_img_valid, b_img_ready;
  byte_t  a_img_byte, b_img_byte;
  logic   a_txd, b_txd;
  logic   a_lcd_valid, a_lcd_ready, b_lcd_valid, b_lcd_ready;
  byte_t  a_lcd_byte, b_lcd_byte;
  logic   a_ovr, b_ovr, a_ferr, b_ferr, a_stall, b_stall, a_sw, b_sw;

  board_tld u_a (
    .clk, .rst_n, .key_load, .key(KEY), .key_ready(a_key_ready),
    .img_valid(a_img_valid), .img_ready(a_img_ready), .img_byte(a_img_byte),
    .uart_txd(a_txd), .uart_rxd(b_txd),
    .lcd_valid(a_lcd_valid), .lcd_ready(a_lcd_ready), .lcd_byte(a_lcd_byte),
    .rx_overrun(a_ovr), .rx_frame_err(a_ferr), .sched_stall(a_stall), .sched_mode_switch(a_sw));

  board_tld u_b (
    .clk, .rst_n, .key_load, .key(KEY), .key_ready(b_key_ready),
    .img_valid(b_img_valid), .img_ready(b_img_ready), .img_byte(b_img_byte),
    .uart_txd(b_txd), .uart_rxd(a_txd),
    .lcd_valid(b_lcd_valid), .lcd_ready(b_lcd_ready), .lcd_byte(b_lcd_byte),
    .rx_overrun(b_ovr), .rx_frame_err(b_ferr), .sched_stall(b_stall), .sched_mode_switch(b_sw));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  byte_t img_a [A_BYTES];
  byte_t img_b [B_BYTES];

  // Event counters.
  int a_stalls = 0, b_stalls = 0, a_switches = 0, b_switches = 0, lcd_waits = 0, errs = 0;
  int a_lcd_n = 0, b_lcd_n = 0, line_n = 0;

  always @(posedge clk) if (rst_n) begin
    if (a_stall) a_stalls++;
    if (b_stall) b_stalls++;
    if (a_sw) a_switches++;
    if (b_sw) b_switches++;
    if (b_lcd_valid && !b_lcd_ready) lcd_waits++;
    if (a_ovr || b_ovr || a_ferr || b_ferr) errs++;
    if (a_lcd_valid && a_lcd_ready) begin
      if (a_lcd_n < B_BYTES) check($sformatf("A display byte %0d", a_lcd_n), 128'(a_lcd_byte), 128'(img_b[a_lcd_n]));
      else check("A display extra byte", 1, 0);
      a_lcd_n++;
    end
    if (b_lcd_valid && b_lcd_ready) begin
      if (b_lcd_n < A_BYTES) check($sformatf("B display byte %0d", b_lcd_n), 128'(b_lcd_byte), 128'(img_a[b_lcd_n]));
      else check("B display extra byte", 1, 0);
      b_lcd_n++;
    end
  end

  // Decode A's serial line and compare with the reference ciphertext.
  initial begin
    logic [127:0] ct;
    byte_t b;
    forever begin
      @(negedge a_txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = a_txd;
      end
      repeat (CPB) @(posedge clk);
      check("A stop bit", 128'(a_txd), 128'd1);
      if (line_n % 16 == 0) begin
        logic [127:0] pt;
        for (int k = 0; k < 16; k++) pt[127-8*k -: 8] = img_a[line_n + k];
        ct = aes_ref_pkg::encrypt(KEY, pt);
      end
      if (line_n < A_BYTES) check($sformatf("ciphertext byte %0d", line_n), 128'(b), 128'(ct[127-8*(line_n%16) -: 8]));
      line_n++;
    end
  end

  // B's display is slow at times.
  always @(negedge clk) b_lcd_ready <= ($urandom_range(0, 9) != 0);
  assign a_lcd_ready = 1'b1;

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    aes_ref_pkg::init();
    // Colour image: 8 x 8 RGB gradient, 192 bytes, zero padded to 256.
    for (int i = 0; i < A_BYTES; i++) img_a[i] = '0;
    for (int p = 0; p < 64; p++) begin
      img_a[3*p]     = byte_t'(32 * (p % 8));
      img_a[3*p + 1] = byte_t'(32 * (p / 8));
      img_a[3*p + 2] = byte_t'(p * 7 + 3);
    end
    // Gray image: 16 x 8 pixels.
    for (int i = 0; i < B_BYTES; i++) img_b[i] = byte_t'((i % 16) * 16 + i / 16);

    key_load = 0;
    a_img_valid = 0; b_img_valid = 0; a_img_byte = '0; b_img_byte = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    key_load = 1;
    @(negedge clk);
    key_load = 0;
    cyc = 0;
    while (!a_key_ready) begin @(negedge clk); cyc++; end
    check("key_ready latency", 128'(cyc), 128'd10);
    check("both boards ready", 128'(b_key_ready), 128'd1);

    fork
      begin
        for (int i = 0; i < A_BYTES; i++) begin
          a_img_valid = 1; a_img_byte = img_a[i];
          do @(posedge clk); while (!a_img_ready);
          @(negedge clk);
        end
        a_img_valid = 0;
      end
      begin
        repeat (3 * CPB) @(negedge clk);
        for (int i = 0; i < B_BYTES; i++) begin
          b_img_valid = 1; b_img_byte = img_b[i];
          do @(posedge clk); while (!b_img_ready);
          @(negedge clk);
        end
        b_img_valid = 0;
      end
    join

    wait (a_lcd_n >= B_BYTES && b_lcd_n >= A_BYTES);
    repeat (20 * CPB) @(negedge clk);

    check("A display bytes", 128'(a_lcd_n), 128'(B_BYTES));
    check("B display bytes", 128'(b_lcd_n), 128'(A_BYTES));
    check("link bytes from A", 128'(line_n), 128'(A_BYTES));
    check("no lost or broken bytes", 128'(errs), 128'd0);
    checks++; if (a_stalls == 0)   begin failures++; $display("FAIL no stall on board A"); end
    checks++; if (a_switches == 0) begin failures++; $display("FAIL no mode switch on board A"); end
    checks++; if (b_switches == 0) begin failures++; $display("FAIL no mode switch on board B"); end
    checks++; if (lcd_waits == 0)  begin failures++; $display("FAIL display never stalled"); end
    $display("stall cycles A=%0d B=%0d, mode switches A=%0d B=%0d, display waits=%0d",
             a_stalls, b_stalls, a_switches, b_switches, lcd_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
