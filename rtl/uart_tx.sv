// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop bit.
//
// A byte offered on the valid/ready stream while the transmitter is idle is
// sent as a start bit (0), eight data bits least significant first and a
// stop bit (1), each CLKS_PER_BIT clocks long; the line idles high. in_ready
// is high only while idle, so one frame takes 10 * CLKS_PER_BIT clocks and
// the next byte is taken on the clock after the stop bit ends. The default
// of 434 clocks per bit gives 115200 baud from a 50 MHz clock.
module uart_tx
  import aes_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  byte_t in_byte,
  output logic  txd
);

  localparam int unsigned CNT_W = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  byte_t            shreg;
  logic             bit_end;

  assign in_ready = (state == IDLE);
  assign bit_end  = (cnt == CNT_W'(CLKS_PER_BIT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      txd     <= 1'b1;
    end else begin
      cnt <= bit_end ? '0 : cnt + 1'b1;
      unique case (state)
        IDLE: begin
          cnt <= '0;
          txd <= 1'b1;
          if (in_valid) begin
            shreg <= in_byte;
            txd   <= 1'b0;
            state <= START;
          end
        end
        START: if (bit_end) begin
          txd     <= shreg[0];
          bit_idx <= '0;
          state   <= DATA;
        end
        DATA: if (bit_end) begin
          if (bit_idx == 3'd7) begin
            txd   <= 1'b1;
            state <= STOP;
          end else begin
            bit_idx <= bit_idx + 1'b1;
            txd     <= shreg[bit_idx + 3'd1];
          end
        end
        STOP: if (bit_end) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
