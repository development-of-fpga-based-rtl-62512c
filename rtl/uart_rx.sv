// uart_rx: serial input of the host interface.
//
// Receives asynchronous frames of start bit, eight data bits (least significant
// first) and stop bit at CLKS_PER_BIT clocks per bit. A falling edge on the
// synchronised line is taken as a possible start bit; after a short delay
// (CHECK_DELAY clocks) the line is read again and, if it is no longer Low, the
// edge is dropped as noise. Otherwise a timer runs to 1.5 bit times after the
// edge, so that the first data bit is read in its middle, and then every bit
// time for the remaining seven data bits and the stop bit. If the stop bit is
// not '1' the byte is thrown away and frame_err pulses, so that the PC can be
// asked to send again. The start-bit re-check, the 1.5-bit delay and the
// stop-bit check are the controller's; the length of the re-check delay (a
// quarter bit), the synchroniser and the bit order are this design's choices.
//
// Timing: valid (with data) or frame_err pulses for one clock 9.5 bit times
// plus three clocks after the start edge.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = tc_pkg::CLKS_PER_BIT,
  parameter int unsigned CHECK_DELAY  = CLKS_PER_BIT / 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned FIRST_SAMPLE = CLKS_PER_BIT + CLKS_PER_BIT / 2;
  localparam int unsigned TW = $clog2(FIRST_SAMPLE + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_CHECK, RX_DATA, RX_STOP} rx_state_t;

  rx_state_t   state;
  logic [2:0]  sync;
  logic [TW-1:0] timer;   // clocks since the start edge, or since the last sample
  logic [2:0]  bitno;
  logic [7:0]  shreg;
  logic        line;
  logic        fall;

  assign line = sync[1];
  assign fall = sync[2] && !sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= '1;
      state     <= RX_IDLE;
      timer     <= '0;
      bitno     <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[1:0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      timer     <= timer + 1'b1;
      unique case (state)
        RX_IDLE: if (fall) begin
          timer <= TW'(1);
          state <= RX_CHECK;
        end
        RX_CHECK: if (timer == TW'(CHECK_DELAY)) begin
          if (line) state <= RX_IDLE;      // noise, wait for the next edge
        end else if (timer == TW'(FIRST_SAMPLE)) begin
          shreg <= {line, shreg[7:1]};
          bitno <= 3'd1;
          timer <= TW'(1);
          state <= RX_DATA;
        end
        RX_DATA: if (timer == TW'(CLKS_PER_BIT)) begin
          shreg <= {line, shreg[7:1]};
          bitno <= bitno + 1'b1;
          timer <= TW'(1);
          if (bitno == 3'd7) state <= RX_STOP;
        end
        RX_STOP: if (timer == TW'(CLKS_PER_BIT)) begin
          if (line) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
          state <= RX_IDLE;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  initial begin
    assert (CHECK_DELAY >= 1 && CHECK_DELAY < CLKS_PER_BIT / 2)
      else $error("CHECK_DELAY must lie inside the first half of the start bit");
  end

endmodule
