// timing_controller: the one-chip programmable timing controller.
//
// An inspection line carries small parts on a belt past sensors and actuators
// (valves, a camera trigger). The belt motor's encoder is the time base. For
// each channel the PC sets, over RS-232C, the distance in encoder counts from
// the channel's sensor to its actuator. After the PC's start command, every
// part the sensor sees fires the actuator exactly that many encoder counts
// later, however the parts are spaced, with up to N_BUF parts in transit per
// channel. After each actuator action the channel reports the distance to
// the PC.
//
// Blocks: one sensor_input filter per channel, one shared encoder_counter,
// N_CH main_control channels (counters, memory register, comparator / drive)
// and the host_interface. The 24.576 MHz clock, the three channels, the
// 20-bit counters, the eight buffers and the 9600 b/s link are the
// controller's; the serial command set, the actuator hold time and the
// synchronous active-High reset are this design's choices.
//
// Ports: sensor[i] and drive[i] belong to channel i; encoder is the single
// forward encoder pulse; rxd/txd are the serial line (idle High).
// action, store, overwrite and position are for observation.
module timing_controller #(
  parameter int unsigned N_CH            = tc_pkg::N_CH,
  parameter int unsigned W               = tc_pkg::COUNT_W,
  parameter int unsigned N_BUF           = tc_pkg::N_BUF,
  parameter int unsigned CLKS_PER_BIT    = tc_pkg::CLKS_PER_BIT,
  parameter int unsigned SENSOR_SAMPLES  = tc_pkg::SENSOR_SAMPLES,
  parameter int unsigned ENCODER_SAMPLES = tc_pkg::ENCODER_SAMPLES,
  parameter int unsigned HOLD_CYCLES     = tc_pkg::HOLD_CYCLES
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_CH-1:0] sensor,
  input  logic            encoder,
  input  logic            rxd,
  output logic            txd,
  output logic [N_CH-1:0] drive,
  output logic [N_CH-1:0] action,
  output logic [N_CH-1:0] store,
  output logic [N_CH-1:0] overwrite,
  output logic [W-1:0]    position
);

  logic            en_clk, en_tick;
  logic [N_CH-1:0] sen_high, sen_pulse;
  logic [W-1:0]    first_value;
  logic [N_CH-1:0] first_load;
  logic            run_cmd;
  logic [N_CH-1:0] rpt_valid, rpt_ready;
  logic [W-1:0]    rpt_value [N_CH];
  logic [N_CH-1:0] retrigger, counter1_stopped, running;
  logic            frame_err;

  encoder_counter #(.SAMPLES(ENCODER_SAMPLES), .W(W)) u_encoder (
    .clk(clk), .rst(rst), .encoder_in(encoder), .en_clk(en_clk), .en_tick(en_tick),
    .position(position)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    sensor_input #(.SAMPLES(SENSOR_SAMPLES)) u_sensor (
      .clk(clk), .rst(rst), .sensor_in(sensor[c]), .sen_high(sen_high[c]),
      .sen_pulse(sen_pulse[c])
    );

    main_control #(.W(W), .N_BUF(N_BUF), .HOLD_CYCLES(HOLD_CYCLES)) u_main (
      .clk              (clk),
      .rst              (rst),
      .en_tick          (en_tick),
      .sen_pulse        (sen_pulse[c]),
      .first_value      (first_value),
      .first_load       (first_load[c]),
      .run_cmd          (run_cmd),
      .drive            (drive[c]),
      .action           (action[c]),
      .rpt_valid        (rpt_valid[c]),
      .rpt_value        (rpt_value[c]),
      .rpt_ready        (rpt_ready[c]),
      .store            (store[c]),
      .overwrite        (overwrite[c]),
      .retrigger        (retrigger[c]),
      .counter1_stopped (counter1_stopped[c]),
      .running          (running[c])
    );
  end

  host_interface #(.N_CH(N_CH), .W(W), .CLKS_PER_BIT(CLKS_PER_BIT)) u_host (
    .clk         (clk),
    .rst         (rst),
    .rxd         (rxd),
    .txd         (txd),
    .first_value (first_value),
    .first_load  (first_load),
    .run_cmd     (run_cmd),
    .rpt_valid   (rpt_valid),
    .rpt_value   (rpt_value),
    .rpt_ready   (rpt_ready),
    .frame_err   (frame_err)
  );

endmodule
