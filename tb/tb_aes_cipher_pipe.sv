// tb_aes_cipher_pipe: runs the encryption and the decryption pipeline on the
// FIPS-197 vectors and on a back-to-back stream of random blocks (one per
// clock, with gaps), checks every result against the reference model, checks
// that each result appears exactly 11 clocks after its block went in, that
// the tag travels with it, and that decrypting the ciphertext returns the
// plaintext.
module tb_aes_cipher_pipe;
  import aes_pkg::*;

  localparam int LAT = 11;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  int cycle = 0;

  logic        e_in_valid, d_in_valid, e_out_valid, d_out_valid;
  block_t      e_in, d_in, e_out, d_out;
  logic [3:0]  e_tag_in, d_tag_in, e_tag_out, d_tag_out;
  round_keys_t ek, dk;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  aes_cipher_pipe #(.INVERSE(1'b0), .TAG_W(4)) dut_enc (
    .clk, .rst_n, .in_valid(e_in_valid), .in_block(e_in), .in_tag(e_tag_in), .round_keys(ek),
    .out_valid(e_out_valid), .out_block(e_out), .out_tag(e_tag_out));
  aes_cipher_pipe #(.INVERSE(1'b1), .TAG_W(4)) dut_dec (
    .clk, .rst_n, .in_valid(d_in_valid), .in_block(d_in), .in_tag(d_tag_in), .round_keys(dk),
    .out_valid(d_out_valid), .out_block(d_out), .out_tag(d_tag_out));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic set_key(logic [127:0] k);
    logic [127:0] rk [11];
    aes_ref_pkg::expand(k, rk);
    for (int r = 0; r <= 10; r++) ek[r] = rk[r];
    dk[0] = rk[10];
    dk[10] = rk[0];
    for (int r = 1; r < 10; r++) dk[r] = aes_ref_pkg::from_state(aes_ref_pkg::mix(aes_ref_pkg::to_state(rk[10 - r]), 1));
  endtask

  // Expected results, queued when a block enters.
  typedef struct { logic [127:0] data; logic [3:0] tag; int due; } exp_t;
  exp_t e_q [$], d_q [$];
  logic [127:0] cur_key;

  always @(negedge clk) if (rst_n) begin
    exp_t x;
    if (e_out_valid) begin
      if (e_q.size() == 0) begin checks++; failures++; $display("FAIL unexpected enc result"); end
      else begin
        x = e_q.pop_front();
        check("enc data", e_out, x.data);
        check("enc tag", 128'(e_tag_out), 128'(x.tag));
        check("enc latency", 128'(cycle), 128'(x.due));
      end
    end
    if (d_out_valid) begin
      if (d_q.size() == 0) begin checks++; failures++; $display("FAIL unexpected dec result"); end
      else begin
        x = d_q.pop_front();
        check("dec data", d_out, x.data);
        check("dec tag", 128'(d_tag_out), 128'(x.tag));
        check("dec latency", 128'(cycle), 128'(x.due));
      end
    end
  end

  // Drive one block into both pipelines (plaintext into enc, its ciphertext into dec).
  task automatic push(logic [127:0] pt, logic [3:0] tag);
    logic [127:0] ct = aes_ref_pkg::encrypt(cur_key, pt);
    e_in_valid = 1; e_in = pt; e_tag_in = tag;
    d_in_valid = 1; d_in = ct; d_tag_in = tag;
    e_q.push_back('{ct, tag, cycle + LAT});
    d_q.push_back('{pt, tag, cycle + LAT});
    @(negedge clk);
    e_in_valid = 0; d_in_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aes_ref_pkg::init();
    e_in_valid = 0; d_in_valid = 0; e_in = '0; d_in = '0; e_tag_in = '0; d_tag_in = '0;
    cur_key = 128'h000102030405060708090a0b0c0d0e0f;
    set_key(cur_key);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Reference model against FIPS-197 C.1 first, then the RTL.
    check("reference model C.1", aes_ref_pkg::encrypt(cur_key, 128'h00112233445566778899aabbccddeeff),
          128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    push(128'h00112233445566778899aabbccddeeff, 4'h1);
    repeat (LAT + 2) @(negedge clk);
    check("C.1 ciphertext seen", 128'(e_q.size()), 128'd0);
    for (int k = 0; k < 3; k++) begin
      cur_key = (k == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : aes_ref_pkg::rand128();
      set_key(cur_key);
      for (int n = 0; n < 200; n++) begin
        push(aes_ref_pkg::rand128(), 4'($urandom));
        if ($urandom_range(0, 7) == 0) @(negedge clk);
      end
      repeat (LAT + 2) @(negedge clk);   // drain before the key changes
    end
    check("all enc results seen", 128'(e_q.size()), 128'd0);
    check("all dec results seen", 128'(d_q.size()), 128'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
