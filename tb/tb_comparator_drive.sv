// tb_comparator_drive: checks the comparator / drive part against a reference
// model. The testbench plays the memory register part (it writes buffers in
// ring order at random times with random distances and clears flags on the
// completion signal) and counter 2 (counting encoder ticks under the block's
// clear / enable). The model works out from those stimuli when each product
// must reach the actuator: the served buffer's distance counted in encoder
// ticks from the moment it is both current and flagged. It also gives the
// drive output, High for exactly HOLD clocks after the last match, and the
// report handed to the PC when drive falls. Action, completion, drive and
// report are compared every clock; retriggered actions must occur.
module tb_comparator_drive;
  localparam int W = 20, N = 8, HOLD = 20;
  logic clk = 0, rst = 1;
  logic [W-1:0] mem [N];
  logic [N-1:0] ac_bits = 0, cmp_done;
  logic [W-1:0] count2 = 0;
  logic cnt2_clr, cnt2_en, action, drive, rpt_valid, rpt_ready = 0, retrigger;
  logic [W-1:0] rpt_value;
  logic [N-1:0] action_ch;
  logic tick = 0;

  int unsigned checks = 0, failures = 0, n_fire = 0, n_retrig = 0, n_rpt = 0, n_wait = 0;

  // model
  int unsigned  m_ptr = 0, m_hold = 0;
  logic [W-1:0] m_cnt = 0, m_fired = 0, m_rval = 0;
  bit           m_drive = 0, m_rv = 0, m_match;
  int unsigned  wptr = 0;

  always #5 clk = ~clk;

  comparator_drive #(.HOLD_CYCLES(HOLD)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // counter 2 and the flags of the memory register part
  always @(posedge clk) begin
    if (cnt2_clr) count2 <= '0;
    else if (cnt2_en && tick) count2 <= count2 + 1'b1;
    ac_bits <= ac_bits & ~cmp_done;
  end

  always @(posedge clk) if (!rst) begin
    m_match = ac_bits[m_ptr] && (m_cnt == mem[m_ptr]);
    checks++;
    if (action !== m_match || (m_match && cmp_done !== N'(1) << m_ptr) || (!m_match && cmp_done !== 0)) begin
      failures++;
      if (failures < 10) $display("%t: action %0d expected %0d (ptr %0d cnt %0d mem %0d)", $time, action, m_match, m_ptr, m_cnt, mem[m_ptr]);
    end
    if (!ac_bits[m_ptr]) n_wait++;
    if (m_match) begin
      n_fire++;
      if (m_drive) n_retrig++;
      m_fired <= mem[m_ptr];
      m_ptr   <= (m_ptr + 1) % N;
      m_cnt   <= 0;
      m_drive <= 1;
      m_hold  <= 0;
    end else begin
      if (ac_bits[m_ptr] && tick) m_cnt <= m_cnt + 1;
      if (m_drive) begin
        if (m_hold == HOLD - 1) begin
          m_drive <= 0;
          m_rv    <= 1;
          m_rval  <= m_fired;
        end else m_hold <= m_hold + 1;
      end
    end
    if (rpt_valid && rpt_ready) begin
      n_rpt++;
      if (!(m_drive && !m_match && m_hold == HOLD - 1)) m_rv <= 0;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (drive !== m_drive || rpt_valid !== m_rv || (m_rv && rpt_value !== m_rval)) begin
      failures++;
      if (failures < 10) $display("%t: drive %0d/%0d report %0d %0d / %0d %0d", $time, drive, m_drive, rpt_valid, rpt_value, m_rv, m_rval);
    end
  end

  initial begin
    for (int i = 0; i < N; i++) mem[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 40000; n++) begin
      tick = (n % 3 == 0);
      rpt_ready = ($urandom_range(0, 3) == 0);
      // the memory register part writes the next buffer now and then
      if (!ac_bits[wptr] && $urandom_range(0, 99) < ((n / 8000) % 2 == 0 ? 2 : 12)) begin
        mem[wptr] = W'($urandom_range(0, 30));
        ac_bits[wptr] = 1'b1;
        wptr = (wptr + 1) % N;
      end
      @(negedge clk);
    end
    checks++;
    if (n_fire < 100 || n_retrig == 0 || n_rpt == 0 || n_wait == 0) begin
      failures++;
      $display("coverage: fires %0d retriggers %0d reports %0d idle %0d", n_fire, n_retrig, n_rpt, n_wait);
    end
    $display("fires %0d, retriggered %0d, reports %0d", n_fire, n_retrig, n_rpt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
