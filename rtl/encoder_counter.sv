// encoder_counter: encoder pulse filter and position counter.
//
// The motor's encoder pulse is synchronised and sampled on every clock. The
// filtered level en_clk changes only when the line has shown the opposite
// level for SAMPLES (three) samples in a row: three Highs make it High and
// three Lows make it Low. Shorter glitches are ignored. Each rising edge of
// en_clk gives a one-clock en_tick, the encoder clock used by the counters of
// the main control part. Only forward motion is used, so en_tick also steps a
// free-running COUNT_W-bit position counter. The three-sample rule and the
// forward-only use are the controller's; the synchroniser and the position
// counter's wrap-around are this design's choices. Only one encoder phase is
// brought in, so no direction is decoded.
//
// Timing: en_clk follows a clean level change SAMPLES+2 clocks later; en_tick
// is on the clock where en_clk rises. A new encoder period needs at least
// 2*SAMPLES clocks.
module encoder_counter #(
  parameter int unsigned SAMPLES = tc_pkg::ENCODER_SAMPLES,
  parameter int unsigned W       = tc_pkg::COUNT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         encoder_in,
  output logic         en_clk,
  output logic         en_tick,
  output logic [W-1:0] position
);

  localparam int unsigned RUN_W = $clog2(SAMPLES + 1);

  logic [1:0]       sync;
  logic [RUN_W-1:0] run;    // consecutive samples that differ from en_clk
  logic             level;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync     <= '0;
      run      <= '0;
      level    <= 1'b0;
      position <= '0;
    end else begin
      sync <= {sync[0], encoder_in};
      if (sync[1] == level) begin
        run <= '0;
      end else if (run == RUN_W'(SAMPLES - 1)) begin
        run   <= '0;
        level <= sync[1];
      end else begin
        run <= run + 1'b1;
      end
      if (en_tick)
        position <= position + 1'b1;
    end
  end

  logic level_q;
  always_ff @(posedge clk) begin
    if (rst) level_q <= 1'b0;
    else     level_q <= level;
  end

  assign en_clk  = level;
  assign en_tick = level && !level_q;

endmodule
