// comparator_drive: the comparator / drive part of one main control channel.
//
// The one-hot pointer Action_ch selects the buffer being served; it starts at
// buffer 1 and follows the memory register's pointer round the ring. While that
// buffer's flag (ac_bits) is set, counter 2 counts encoder ticks and is
// compared with the buffer's value. When they are equal the product is at the
// actuator:
//   * action pulses for one clock (Action_bit), counter 2 is cleared, the
//     buffer's flag is cleared through cmp_done (the comparison completion
//     signal) and Action_ch moves to the next buffer. If that buffer is already
//     flagged, counting for it starts at once from zero, which is exactly the
//     distance the memory register stored for it;
//   * drive goes High and counter 3 (s_count_bit set) counts HOLD_CYCLES
//     clocks. Then drive goes Low, counter 3 clears itself, and the matched
//     distance is offered to the PC as the action-ending report.
// A match while drive is still High restarts the hold time; the report then
// carries the newest match. A report not yet taken by the host interface is
// replaced by a newer one.
//
// The compare rule, the ring of buffers, counter 3 and the report to the PC
// are the controller's. The hold time, its unit (clocks), the retrigger rule and
// the report handshake are this design's choices.
//
// Timing: action and cnt2_clr are combinational on the clock where counter 2
// equals the buffer value; drive rises on the next clock and stays High for
// exactly HOLD_CYCLES clocks; rpt_valid rises on the clock drive falls and
// stays until rpt_ready.
module comparator_drive #(
  parameter int unsigned W           = tc_pkg::COUNT_W,
  parameter int unsigned N_BUF       = tc_pkg::N_BUF,
  parameter int unsigned HOLD_W      = tc_pkg::COUNT_W,
  parameter int unsigned HOLD_CYCLES = tc_pkg::HOLD_CYCLES
) (
  input  logic             clk,
  input  logic             rst,
  // from the memory register part
  input  logic [W-1:0]     mem [N_BUF],
  input  logic [N_BUF-1:0] ac_bits,
  output logic [N_BUF-1:0] cmp_done,
  // counter 2
  input  logic [W-1:0]     count2,
  output logic             cnt2_clr,
  output logic             cnt2_en,
  // actuator
  output logic             action,
  output logic             drive,
  // action-ending report to the PC
  output logic             rpt_valid,
  output logic [W-1:0]     rpt_value,
  input  logic             rpt_ready,
  // status
  output logic [N_BUF-1:0] action_ch,
  output logic             retrigger
);

  logic [W-1:0]      cur_value;
  logic              pending;
  logic              s_count_bit;
  logic [W-1:0]      fired_value;
  logic [HOLD_W-1:0] count3;
  logic              hold_end;

  always_comb begin
    cur_value = '0;
    for (int i = 0; i < N_BUF; i++)
      if (action_ch[i]) cur_value = mem[i];
  end

  assign pending   = |(ac_bits & action_ch);
  assign action    = pending && (count2 == cur_value);
  assign cnt2_en   = pending && !action;
  assign cnt2_clr  = action;
  assign cmp_done  = action ? action_ch : '0;
  assign hold_end  = s_count_bit && (count3 == HOLD_W'(HOLD_CYCLES - 1));
  assign retrigger = action && s_count_bit;

  // Counter 3: holds the actuator on for HOLD_CYCLES clocks, then auto-resets.
  up_counter #(.W(HOLD_W)) u_counter3 (
    .clk   (clk),
    .rst   (rst),
    .clr   (action || hold_end),
    .en    (s_count_bit),
    .tick  (1'b1),
    .count (count3)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      action_ch   <= N_BUF'(1);
      s_count_bit <= 1'b0;
      drive       <= 1'b0;
      fired_value <= '0;
      rpt_valid   <= 1'b0;
      rpt_value   <= '0;
    end else begin
      if (rpt_valid && rpt_ready)
        rpt_valid <= 1'b0;
      if (action) begin
        action_ch   <= {action_ch[N_BUF-2:0], action_ch[N_BUF-1]};
        s_count_bit <= 1'b1;
        drive       <= 1'b1;
        fired_value <= cur_value;
      end else if (hold_end) begin
        s_count_bit <= 1'b0;
        drive       <= 1'b0;
        rpt_valid   <= 1'b1;
        rpt_value   <= fired_value;
      end
    end
  end

  initial begin
    assert (HOLD_CYCLES >= 1 && 64'(HOLD_CYCLES) < (64'd1 << HOLD_W))
      else $error("HOLD_CYCLES must fit counter 3");
  end

  a_action_ch_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(action_ch));
  a_drive_follows_action: assert property (@(posedge clk) disable iff (rst) action |=> drive);

endmodule
