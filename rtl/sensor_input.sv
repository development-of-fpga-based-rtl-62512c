// sensor_input: noise filter for one product sensor.
//
// The sensor line is brought into the clock domain by two flip-flops and then
// sampled on every clock. A run counter counts consecutive High samples; the
// input is accepted as a real sensor event only when SAMPLES (five) samples in a
// row are High. Any Low sample resets the run, so a shorter High pulse is taken
// for noise and ignored. The five-sample rule is the controller's; the
// synchroniser and the Low handling (one Low sample ends the valid level) are
// this design's choices.
//
// Ports: sensor_in is the raw line. sen_high is the accepted level; sen_pulse
// is one clock wide on the clock where sen_high rises, and is what the memory
// register part acts on.
// Timing: sen_high rises SAMPLES+2 clocks after the line rises (two synchroniser
// stages, then SAMPLES High samples) and falls 3 clocks after the line falls.
module sensor_input #(
  parameter int unsigned SAMPLES = tc_pkg::SENSOR_SAMPLES
) (
  input  logic clk,
  input  logic rst,
  input  logic sensor_in,
  output logic sen_high,
  output logic sen_pulse
);

  localparam int unsigned RUN_W = $clog2(SAMPLES + 1);

  logic [1:0]       sync;
  logic [RUN_W-1:0] run;
  logic             high_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync   <= '0;
      run    <= '0;
      high_q <= 1'b0;
    end else begin
      sync <= {sync[0], sensor_in};
      if (!sync[1])
        run <= '0;
      else if (run != RUN_W'(SAMPLES))
        run <= run + 1'b1;
      high_q <= sen_high;
    end
  end

  assign sen_high  = (run == RUN_W'(SAMPLES));
  assign sen_pulse = sen_high && !high_q;

endmodule
