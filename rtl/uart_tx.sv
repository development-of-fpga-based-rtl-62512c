// uart_tx: serial output of the host interface.
//
// Sends one byte as an asynchronous frame: start bit '0', eight data bits
// (least significant first), stop bit '1', each bit lasting one bit_tick period
// (9600 b/s). A byte is accepted when valid and ready are both High; ready is
// High only while the transmitter is idle. The frame format is the
// controller's; the bit order and the valid/ready handshake are this design's
// choices.
// Timing: the start bit begins at the first bit_tick after the byte is taken;
// ready returns one clock after the stop bit has lasted one bit period.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_tick,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  typedef enum logic [1:0] {TX_IDLE, TX_WAIT, TX_SHIFT} tx_state_t;

  tx_state_t   state;
  logic [9:0]  frame;   // stop, data[7:0], start; bit 0 goes out first
  logic [3:0]  nbits;   // bits still to send

  assign ready = (state == TX_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= TX_IDLE;
      frame <= '1;
      nbits <= '0;
      txd   <= 1'b1;
    end else begin
      unique case (state)
        TX_IDLE: if (valid) begin
          frame <= {1'b1, data, 1'b0};
          nbits <= 4'd10;
          state <= TX_WAIT;
        end
        TX_WAIT: if (bit_tick) begin
          txd   <= frame[0];
          frame <= {1'b1, frame[9:1]};
          nbits <= nbits - 1'b1;
          state <= TX_SHIFT;
        end
        TX_SHIFT: if (bit_tick) begin
          if (nbits == 0) begin
            state <= TX_IDLE;
          end else begin
            txd   <= frame[0];
            frame <= {1'b1, frame[9:1]};
            nbits <= nbits - 1'b1;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  a_line_idle_high: assert property (@(posedge clk) disable iff (rst) (state == TX_IDLE) |-> txd);

endmodule
