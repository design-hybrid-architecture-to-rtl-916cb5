// tb_processing_engine: drives one engine with a random mix of encryption and
// decryption blocks, one per clock with the mode changing freely, using round
// keys from aes_key_expand. Each result must match the reference model, carry
// its tag and mode, and appear exactly 11 clocks after its block.
module tb_processing_engine;
  import aes_pkg::*;

  localparam int LAT = 11;

  int checks = 0, failures = 0, cycle = 0, switches = 0;
  logic clk = 0, rst_n = 0;

  logic        key_load, key_ready;
  block_t      key;
  round_keys_t ek, dk;
  logic        in_valid, out_valid;
  aes_mode_e   in_mode, out_mode, prev_mode;
  block_t      in_block, out_block;
  logic [3:0]  in_tag, out_tag;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  aes_key_expand u_keys (.clk, .rst_n, .key_load, .key, .key_ready, .enc_keys(ek), .dec_keys(dk));

  processing_engine #(.TAG_W(4)) dut (
    .clk, .rst_n, .in_valid, .in_mode, .in_block, .in_tag, .enc_keys(ek), .dec_keys(dk),
    .out_valid, .out_mode, .out_block, .out_tag);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  typedef struct { logic [127:0] data; logic [3:0] tag; aes_mode_e mode; int due; } exp_t;
  exp_t q [$];

  always @(negedge clk) if (rst_n) begin
    exp_t x;
    if (out_valid) begin
      if (q.size() == 0) begin checks++; failures++; $display("FAIL unexpected result"); end
      else begin
        x = q.pop_front();
        check("data", out_block, x.data);
        check("tag", 128'(out_tag), 128'(x.tag));
        check("mode", 128'(out_mode), 128'(x.mode));
        check("latency", 128'(cycle), 128'(x.due));
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] b;
    aes_ref_pkg::init();
    in_valid = 0; in_mode = MODE_ENC; in_block = '0; in_tag = '0; key_load = 0;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); key_load = 1;
    @(negedge clk); key_load = 0;
    wait (key_ready);
    @(negedge clk);
    prev_mode = MODE_ENC;
    for (int n = 0; n < 400; n++) begin
      in_valid = ($urandom_range(0, 5) != 0);
      in_mode  = aes_mode_e'($urandom_range(0, 1));
      b = aes_ref_pkg::rand128();
      if (n == 0) begin in_valid = 1; in_mode = MODE_ENC; b = 128'h00112233445566778899aabbccddeeff; end
      if (n == 1) begin in_valid = 1; in_mode = MODE_DEC; b = 128'h69c4e0d86a7b0430d8cdb78070b4c55a; end
      in_block = b;
      in_tag = 4'(n);
      if (in_valid) begin
        if (in_mode != prev_mode) switches++;
        prev_mode = in_mode;
        q.push_back('{(in_mode == MODE_ENC) ? aes_ref_pkg::encrypt(key, b) : aes_ref_pkg::decrypt(key, b),
                      4'(n), in_mode, cycle + LAT});
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    check("all results seen", 128'(q.size()), 128'd0);
    checks++;
    if (switches < 10) begin failures++; $display("FAIL too few mode switches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
