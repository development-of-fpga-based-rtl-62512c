// main_control: one channel of the main control part (one sensor, one actuator).
//
// Counter 1 measures encoder counts since the last product; the memory register
// part stores that distance (or the first value) per product in a ring of
// eight buffers; counter 2 and the comparator / drive part count each product
// down to the actuator and fire the drive output. Counter 1 and counter 2 both
// count the encoder tick en_tick. This is the structure of the main control
// part with its reset, count-value, comparison-start and comparison-completion
// connections; it adds no logic of its own.
//
// A product sensed at encoder count t fires the actuator at encoder count
// t + First_value, for any spacing of products, as long as no more than N_BUF
// products are between sensor and actuator at once.
// Ports: first_value/first_load/run_cmd come from the host interface; the
// report handshake (rpt_*) goes back to it.
module main_control #(
  parameter int unsigned W           = tc_pkg::COUNT_W,
  parameter int unsigned N_BUF       = tc_pkg::N_BUF,
  parameter int unsigned HOLD_CYCLES = tc_pkg::HOLD_CYCLES
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en_tick,
  input  logic         sen_pulse,
  input  logic [W-1:0] first_value,
  input  logic         first_load,
  input  logic         run_cmd,
  output logic         drive,
  output logic         action,
  output logic         rpt_valid,
  output logic [W-1:0] rpt_value,
  input  logic         rpt_ready,
  // status, for observation
  output logic         store,
  output logic         overwrite,
  output logic         retrigger,
  output logic         counter1_stopped,
  output logic         running
);

  logic [W-1:0]     count1, count2;
  logic             cnt1_clr, cnt1_en, cnt2_clr, cnt2_en;
  logic [W-1:0]     mem [N_BUF];
  logic [N_BUF-1:0] ac_bits, cmp_done, memory_ch, action_ch;
  logic             start_bit, first_value_valid;

  up_counter #(.W(W)) u_counter1 (
    .clk(clk), .rst(rst), .clr(cnt1_clr), .en(cnt1_en), .tick(en_tick), .count(count1)
  );

  up_counter #(.W(W)) u_counter2 (
    .clk(clk), .rst(rst), .clr(cnt2_clr), .en(cnt2_en), .tick(en_tick), .count(count2)
  );

  memory_register #(.W(W), .N_BUF(N_BUF)) u_memory (
    .clk               (clk),
    .rst               (rst),
    .first_value_in    (first_value),
    .first_load        (first_load),
    .run_cmd           (run_cmd),
    .sen_pulse         (sen_pulse),
    .count1            (count1),
    .tick              (en_tick),
    .cnt1_clr          (cnt1_clr),
    .cnt1_en           (cnt1_en),
    .mem               (mem),
    .ac_bits           (ac_bits),
    .cmp_done          (cmp_done),
    .memory_ch         (memory_ch),
    .first_value_valid (first_value_valid),
    .running           (running),
    .start_bit         (start_bit),
    .store             (store),
    .overwrite         (overwrite)
  );

  comparator_drive #(.W(W), .N_BUF(N_BUF), .HOLD_W(W), .HOLD_CYCLES(HOLD_CYCLES)) u_compare (
    .clk       (clk),
    .rst       (rst),
    .mem       (mem),
    .ac_bits   (ac_bits),
    .cmp_done  (cmp_done),
    .count2    (count2),
    .cnt2_clr  (cnt2_clr),
    .cnt2_en   (cnt2_en),
    .action    (action),
    .drive     (drive),
    .rpt_valid (rpt_valid),
    .rpt_value (rpt_value),
    .rpt_ready (rpt_ready),
    .action_ch (action_ch),
    .retrigger (retrigger)
  );

  assign counter1_stopped = start_bit && !cnt1_en;

endmodule
