// memory_register: the memory register part of one main control channel.
//
// It records, for each product the sensor sees, how many encoder counts the
// comparator must wait before that product is at the actuator. Nothing happens
// until the PC has sent the start command (run_cmd). Then on each accepted
// sensor event (sen_pulse):
//   * first sensor event: the buffer gets First_value, the sensor-to-actuator
//     distance the PC sent, and counter 1 is started from zero;
//   * later events: the buffer gets counter 1, the distance from the previous
//     product, and counter 1 restarts from zero. Counter 1 stops counting once
//     it reaches First_value; a product further than that behind the previous
//     one therefore gets First_value, because the previous product has already
//     left the actuator and the comparator starts afresh.
// The eight buffers (Memory_1..Memory_8) are filled in turn, the one-hot
// pointer Memory_ch rotating after each store and wrapping from the last buffer
// to the first. Each buffer has a flag (ac_bits, ac_1_bit..ac_8_bit) that is
// set when it is written, which is the comparison start signal to the
// comparator, and cleared by the comparator's completion signal cmp_done.
// Writing a buffer whose flag is still set loses an unserved product; this
// is flagged on overwrite.
//
// The buffer count, widths, first-value rule and counter-1 stop are the
// controller's. Reset values, the sampling of First_value at load time and
// the overwrite flag are this design's choices.
//
// Timing: a store happens on the clock of sen_pulse; mem, ac_bits and the
// pointer show it one clock later, and counter 1 is cleared on that clock. An
// encoder tick on that same clock counts as before the product: it is added to
// the stored distance, and the new distance starts after it. The comparator
// starts counting a product it was idle for on the next clock, so the two
// agree and every product fires exactly First_value ticks after the end of its
// store clock.
module memory_register #(
  parameter int unsigned W     = tc_pkg::COUNT_W,
  parameter int unsigned N_BUF = tc_pkg::N_BUF
) (
  input  logic             clk,
  input  logic             rst,
  // from the host interface
  input  logic [W-1:0]     first_value_in,
  input  logic             first_load,
  input  logic             run_cmd,
  // from the sensor input part
  input  logic             sen_pulse,
  // counter 1 and the encoder tick it counts
  input  logic [W-1:0]     count1,
  input  logic             tick,
  output logic             cnt1_clr,
  output logic             cnt1_en,
  // to and from the comparator / drive part
  output logic [W-1:0]     mem [N_BUF],
  output logic [N_BUF-1:0] ac_bits,
  input  logic [N_BUF-1:0] cmp_done,
  // status
  output logic [N_BUF-1:0] memory_ch,
  output logic             first_value_valid,
  output logic             running,
  output logic             start_bit,
  output logic             store,
  output logic             overwrite
);

  logic [W-1:0] first_value;
  logic [W-1:0] store_value;
  logic [W-1:0] distance;
  logic         counter_stopped;

  assign counter_stopped = (count1 >= first_value);
  assign store           = running && sen_pulse;
  assign overwrite       = store && |(ac_bits & memory_ch);
  // A tick on the store clock is lost to counter 1's clear, so it is added here.
  assign distance        = count1 + W'(cnt1_en && tick);
  assign store_value     = (start_bit && distance < first_value) ? distance : first_value;
  assign cnt1_clr        = store;
  assign cnt1_en         = start_bit && !counter_stopped;

  always_ff @(posedge clk) begin
    if (rst) begin
      first_value       <= '0;
      first_value_valid <= 1'b0;
      running           <= 1'b0;
      start_bit         <= 1'b0;
      memory_ch         <= N_BUF'(1);
      ac_bits           <= '0;
      for (int i = 0; i < N_BUF; i++) mem[i] <= '0;
    end else begin
      if (first_load) begin
        first_value       <= first_value_in;
        first_value_valid <= 1'b1;
      end
      if (run_cmd)
        running <= 1'b1;

      ac_bits <= (ac_bits & ~cmp_done) | (store ? memory_ch : '0);
      if (store) begin
        for (int i = 0; i < N_BUF; i++)
          if (memory_ch[i]) mem[i] <= store_value;
        memory_ch <= {memory_ch[N_BUF-2:0], memory_ch[N_BUF-1]};
        start_bit <= 1'b1;
      end
    end
  end

  // The buffer pointer is one-hot at all times.
  a_memory_ch_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(memory_ch));

endmodule
