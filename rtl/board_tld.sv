// board_tld: top level of one board of the image link, transmitter and
// receiver in one.
//
// Both boards of the link carry this same design. On the sending side a
// prepared image (its length a multiple of 128 bytes) streams in on img_*;
// seg_packer gathers 128 bytes, the NUM_PE processing engines encrypt the
// segment's eight AES blocks in NUM_PE-wide beats (two beats with four
// engines), seg_unpacker holds the ciphertext and uart_tx sends it out on
// uart_txd, which goes to the radio link. On the receiving side bytes from
// the link arrive on uart_rxd, uart_rx and a second seg_packer rebuild the
// segment, the same engines decrypt it and a second seg_unpacker streams the
// plain image out on lcd_* towards the display.
//
// All engines share one AES-128 key schedule (aes_key_expand): pulse key_load
// with the key; key_ready follows 10 clocks later and no segment starts
// before it. seg_scheduler gives the engines to whichever direction has a
// full input segment and a free output buffer, alternating when both do.
// Each engine accepts one 128-bit block per clock and has an 11-clock
// latency; the UART, not the engines, limits the link rate.
//
// Status outputs: rx_overrun pulses when a received byte is lost because the
// receive segment buffer was still full, rx_frame_err when a byte had a bad
// stop bit, sched_stall is high while a full segment waits for its output
// buffer, sched_mode_switch pulses when the engines change direction.
// One clock domain; reset is active low and asynchronous.
module board_tld
  import aes_pkg::*;
#(
  parameter int unsigned NUM_PE       = 4,
  parameter int unsigned SEG_BYTES    = 128,
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic   clk,
  input  logic   rst_n,
  // key
  input  logic   key_load,
  input  block_t key,
  output logic   key_ready,
  // image from storage (byte stream)
  input  logic   img_valid,
  output logic   img_ready,
  input  byte_t  img_byte,
  // serial link
  output logic   uart_txd,
  input  logic   uart_rxd,
  // decrypted image to the display (byte stream)
  output logic   lcd_valid,
  input  logic   lcd_ready,
  output byte_t  lcd_byte,
  // status
  output logic   rx_overrun,
  output logic   rx_frame_err,
  output logic   sched_stall,
  output logic   sched_mode_switch
);

  localparam int unsigned NBEATS = SEG_BYTES / 16 / NUM_PE;
  localparam int unsigned BEAT_W = (NBEATS > 1) ? $clog2(NBEATS) : 1;

  round_keys_t enc_keys, dec_keys;

  aes_key_expand u_keys (
    .clk, .rst_n, .key_load, .key, .key_ready, .enc_keys, .dec_keys
  );

  // ---------------- input segment buffers ----------------
  logic                enc_src_full, dec_src_full;
  logic                enc_src_release, dec_src_release;
  logic [BEAT_W-1:0]   issue_beat;
  block_t [NUM_PE-1:0] enc_src_blocks, dec_src_blocks;

  seg_packer #(.SEG_BYTES(SEG_BYTES), .LANES(NUM_PE)) u_img_buf (
    .clk, .rst_n,
    .in_valid    (img_valid),
    .in_ready    (img_ready),
    .in_byte     (img_byte),
    .full        (enc_src_full),
    .rd_beat     (issue_beat),
    .rd_blocks   (enc_src_blocks),
    .release_seg (enc_src_release)
  );

  logic  rx_valid, rx_ready;
  byte_t rx_byte;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk, .rst_n,
    .rxd       (uart_rxd),
    .out_valid (rx_valid),
    .out_byte  (rx_byte),
    .frame_err (rx_frame_err)
  );

  assign rx_overrun = rx_valid && !rx_ready;

  seg_packer #(.SEG_BYTES(SEG_BYTES), .LANES(NUM_PE)) u_rx_buf (
    .clk, .rst_n,
    .in_valid    (rx_valid),
    .in_ready    (rx_ready),
    .in_byte     (rx_byte),
    .full        (dec_src_full),
    .rd_beat     (issue_beat),
    .rd_blocks   (dec_src_blocks),
    .release_seg (dec_src_release)
  );

  // ---------------- scheduler ----------------
  logic      issue_valid;
  aes_mode_e issue_mode;
  logic      enc_dst_free, dec_dst_free, enc_dst_reserve, dec_dst_reserve;

  seg_scheduler #(.NBEATS(NBEATS)) u_sched (
    .clk, .rst_n,
    .keys_ready      (key_ready),
    .enc_src_full, .dec_src_full,
    .enc_dst_free, .dec_dst_free,
    .issue_valid, .issue_mode, .issue_beat,
    .enc_src_release, .dec_src_release,
    .enc_dst_reserve, .dec_dst_reserve,
    .stall           (sched_stall),
    .mode_switch     (sched_mode_switch)
  );

  // ---------------- processing engines ----------------
  logic      [NUM_PE-1:0]             pe_valid;
  aes_mode_e [NUM_PE-1:0]             pe_mode;
  block_t    [NUM_PE-1:0]             pe_block;
  logic      [NUM_PE-1:0][BEAT_W-1:0] pe_tag;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    processing_engine #(.TAG_W(BEAT_W)) u_pe (
      .clk, .rst_n,
      .in_valid  (issue_valid),
      .in_mode   (issue_mode),
      .in_block  (issue_mode == MODE_DEC ? dec_src_blocks[p] : enc_src_blocks[p]),
      .in_tag    (issue_beat),
      .enc_keys, .dec_keys,
      .out_valid (pe_valid[p]),
      .out_mode  (pe_mode[p]),
      .out_block (pe_block[p]),
      .out_tag   (pe_tag[p])
    );
  end

  // All engines run in lockstep; engine 0's valid, mode and tag stand for all.
  logic res_enc, res_dec;
  assign res_enc = pe_valid[0] && pe_mode[0] == MODE_ENC;
  assign res_dec = pe_valid[0] && pe_mode[0] == MODE_DEC;

  // ---------------- output segment buffers ----------------
  logic  tx_valid, tx_ready;
  byte_t tx_byte;

  seg_unpacker #(.SEG_BYTES(SEG_BYTES), .LANES(NUM_PE)) u_ct_buf (
    .clk, .rst_n,
    .free      (enc_dst_free),
    .reserve   (enc_dst_reserve),
    .wr_en     (res_enc),
    .wr_beat   (pe_tag[0]),
    .wr_blocks (pe_block),
    .out_valid (tx_valid),
    .out_ready (tx_ready),
    .out_byte  (tx_byte)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk, .rst_n,
    .in_valid (tx_valid),
    .in_ready (tx_ready),
    .in_byte  (tx_byte),
    .txd      (uart_txd)
  );

  seg_unpacker #(.SEG_BYTES(SEG_BYTES), .LANES(NUM_PE)) u_pt_buf (
    .clk, .rst_n,
    .free      (dec_dst_free),
    .reserve   (dec_dst_reserve),
    .wr_en     (res_dec),
    .wr_beat   (pe_tag[0]),
    .wr_blocks (pe_block),
    .out_valid (lcd_valid),
    .out_ready (lcd_ready),
    .out_byte  (lcd_byte)
  );

  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
    pe_valid == '0 || (pe_valid == '1 && pe_mode == {NUM_PE{pe_mode[0]}} && pe_tag == {NUM_PE{pe_tag[0]}}));

endmodule
