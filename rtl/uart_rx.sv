// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop bit.
//
// The rxd line is first passed through two flip-flops to bring it into the
// clock domain. A falling edge on the idle line starts a frame; the start bit
// is checked again half a bit later, and from there every data bit is sampled
// in the middle of its bit time, least significant first. At the middle of
// the stop bit out_valid pulses for one clock with the byte if the stop bit
// is high; otherwise frame_err pulses and the byte is dropped. No clock is
// shared with the transmitter: only CLKS_PER_BIT must match on both sides.
module uart_rx
  import aes_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rxd,
  output logic  out_valid,
  output byte_t out_byte,
  output logic  frame_err
);

  localparam int unsigned CNT_W = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  localparam int unsigned HALF  = CLKS_PER_BIT / 2;

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e           state;
  logic [1:0]       sync_q;
  logic             rx_s;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  byte_t            shreg;

  assign rx_s = sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= 2'b11;
    else        sync_q <= {sync_q[0], rxd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      out_valid <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if (!rx_s) state <= START;
        end
        START: begin
          if (cnt == CNT_W'(HALF)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx_s ? IDLE : DATA;   // glitch, not a start bit
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= STOP;
            else                 bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        STOP: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt       <= '0;
            out_valid <= rx_s;
            frame_err <= !rx_s;
            state     <= IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign out_byte = shreg;

endmodule
