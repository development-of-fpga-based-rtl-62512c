// baud_gen: the clock generator of the host interface.
//
// Divides the 24.576 MHz system clock by DIV = 2560 to give a one-clock tick
// at 9600 per second, the serial bit rate. The divisor is the controller's
// (equation (1)); the counter form is this design's choice.
// Timing: tick is High on every DIV-th clock, the first one DIV clocks after
// reset.
module baud_gen #(
  parameter int unsigned DIV = tc_pkg::CLKS_PER_BIT
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  assign tick = (cnt == CW'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst || tick) cnt <= '0;
    else             cnt <= cnt + 1'b1;
  end

endmodule
