// seg_unpacker: on-chip output buffer for one 128-byte processed segment.
//
// The buffer is EMPTY (free = 1) until the scheduler claims it with a pulse
// on reserve. It then takes the engines' results, LANES blocks per write,
// at the beat given with each write; once all SEG_BYTES / (16 * LANES) beats
// are in, it streams the segment out as bytes on a valid/ready stream, in the
// same byte order seg_packer uses. After the last byte is taken it is EMPTY
// again. Claiming the buffer before the first result arrives keeps a second
// segment from being started towards it while the first is still in the
// engines' pipelines.
module seg_unpacker
  import aes_pkg::*;
#(
  parameter int unsigned SEG_BYTES = 128,
  parameter int unsigned LANES     = 4,
  localparam int unsigned NBLK     = SEG_BYTES / 16,
  localparam int unsigned NBEATS   = NBLK / LANES,
  localparam int unsigned BEAT_W   = (NBEATS > 1) ? $clog2(NBEATS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                free,
  input  logic                reserve,
  input  logic                wr_en,
  input  logic [BEAT_W-1:0]   wr_beat,
  input  block_t [LANES-1:0]  wr_blocks,
  output logic                out_valid,
  input  logic                out_ready,
  output byte_t               out_byte
);

  if (SEG_BYTES % (16 * LANES) != 0) begin : g_bad_size
    $error("SEG_BYTES must be a multiple of 16 * LANES");
  end

  localparam int unsigned PTR_W = $clog2(SEG_BYTES);
  localparam int unsigned CNT_W = $clog2(NBEATS + 1);

  typedef enum logic [1:0] {EMPTY, FILLING, DRAIN} state_e;

  state_e           state;
  block_t           mem [NBLK];
  logic [CNT_W-1:0] beats_in;
  logic [PTR_W-1:0] rd_ptr;
  block_t           rd_block;

  assign free      = (state == EMPTY);
  assign out_valid = (state == DRAIN);
  assign rd_block  = mem[rd_ptr[PTR_W-1:4]];
  assign out_byte  = rd_block[127 - 8*rd_ptr[3:0] -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= EMPTY;
      beats_in <= '0;
      rd_ptr   <= '0;
    end else begin
      unique case (state)
        EMPTY: if (reserve) begin
          state    <= FILLING;
          beats_in <= '0;
        end
        FILLING: if (wr_en) begin
          beats_in <= beats_in + 1'b1;
          if (beats_in == CNT_W'(NBEATS - 1)) begin
            state  <= DRAIN;
            rd_ptr <= '0;
          end
        end
        DRAIN: if (out_ready) begin
          rd_ptr <= rd_ptr + 1'b1;
          if (rd_ptr == PTR_W'(SEG_BYTES - 1)) state <= EMPTY;
        end
        default: state <= EMPTY;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && state == FILLING) begin
      for (int l = 0; l < LANES; l++) mem[int'(wr_beat) * LANES + l] <= wr_blocks[l];
    end
  end

  a_write_when_filling : assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> state == FILLING);
  a_reserve_when_empty : assert property (@(posedge clk) disable iff (!rst_n) reserve |-> state == EMPTY);

endmodule
