// up_counter: the counter part of the main control part.
//
// A W-bit (20-bit) up counter. It counts one step on each clock where both en
// (run) and tick (the encoder clock, or a constant 1 to count clocks) are
// High, and wraps at 2**W. clr sets it to zero and wins over a count. Counter 1
// and counter 2 of each channel count encoder ticks; counter 3 counts clocks.
// The width is the controller's; the clear-wins priority is this design's
// choice.
module up_counter #(
  parameter int unsigned W = tc_pkg::COUNT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         en,
  input  logic         tick,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clr)
      count <= '0;
    else if (en && tick)
      count <= count + 1'b1;
  end

endmodule
