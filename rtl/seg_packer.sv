// seg_packer: on-chip input buffer for one 128-byte image segment.
//
// Bytes arrive on a valid/ready stream and are written in order; byte 0 of
// the segment becomes bits [127:120] of block 0, byte 16 the top byte of
// block 1, and so on. After SEG_BYTES bytes the buffer is full: in_ready
// drops and the engines read it, LANES blocks per beat, with rd_beat choosing
// the beat (beat b holds blocks b*LANES .. b*LANES+LANES-1). The read is
// combinational. A one-clock pulse on release empties the buffer and it
// accepts bytes again on the next clock.
module seg_packer
  import aes_pkg::*;
#(
  parameter int unsigned SEG_BYTES = 128,
  parameter int unsigned LANES     = 4,
  localparam int unsigned NBLK     = SEG_BYTES / 16,
  localparam int unsigned NBEATS   = NBLK / LANES,
  localparam int unsigned BEAT_W   = (NBEATS > 1) ? $clog2(NBEATS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  byte_t                    in_byte,
  output logic                     full,
  input  logic [BEAT_W-1:0]        rd_beat,
  output block_t [LANES-1:0]       rd_blocks,
  input  logic                     release_seg
);

  if (SEG_BYTES % (16 * LANES) != 0) begin : g_bad_size
    $error("SEG_BYTES must be a multiple of 16 * LANES");
  end

  localparam int unsigned PTR_W = $clog2(SEG_BYTES);

  block_t           mem [NBLK];
  logic [PTR_W-1:0] wr_ptr;

  assign in_ready = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      full   <= 1'b0;
    end else if (release_seg) begin
      wr_ptr <= '0;
      full   <= 1'b0;
    end else if (in_valid && in_ready) begin
      wr_ptr <= wr_ptr + 1'b1;
      if (wr_ptr == PTR_W'(SEG_BYTES - 1)) full <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready && !release_seg)
      mem[wr_ptr[PTR_W-1:4]][127 - 8*wr_ptr[3:0] -: 8] <= in_byte;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) rd_blocks[l] = mem[int'(rd_beat) * LANES + l];
  end

  a_release_when_full : assert property (@(posedge clk) disable iff (!rst_n) release_seg |-> full);

endmodule
