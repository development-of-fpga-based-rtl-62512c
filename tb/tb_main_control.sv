// tb_main_control: end-to-end test of one main control channel.
// Encoder ticks arrive every 4 clocks; a quarter of the sensor events fall on
// a tick clock, and such a tick counts as before the product. After the first value D and the start
// command, products are sensed at random gaps of 7..80 ticks, some shorter and
// some longer than D, with up to eight products between sensor and actuator.
// Every product must fire the actuator exactly D encoder ticks after it was
// sensed, in order, and each action-ending report must carry the distance the
// channel buffered for the product it last fired (D for the first product and
// after a gap longer than D, else the gap).
module tb_main_control;
  localparam int W = 20, HOLD = 30, D = 50;
  logic clk = 0, rst = 1;
  logic en_tick = 0, sen_pulse = 0, first_load = 0, run_cmd = 0, rpt_ready = 1;
  logic [W-1:0] first_value = 0, rpt_value;
  logic drive, action, rpt_valid, store, overwrite, retrigger, counter1_stopped, running;

  int unsigned checks = 0, failures = 0;
  int unsigned tick_no = 0, last_sense = 0, n_sensed = 0, n_fired = 0, n_rpt = 0;
  int unsigned n_capped = 0, n_short = 0, n_retrig = 0, max_inflight = 0, n_stopped = 0;
  int unsigned due_q[$];
  int unsigned val_q[$];
  int unsigned last_val = 0;
  bit started = 0;

  always #5 clk = ~clk;

  main_control #(.HOLD_CYCLES(HOLD)) dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (en_tick) tick_no++;
    if (counter1_stopped) n_stopped++;
    if (retrigger) n_retrig++;
    if (sen_pulse && running) begin
      int unsigned v;
      v = (!started || tick_no - last_sense >= D) ? D : tick_no - last_sense;
      if (started && v == D) n_capped++;
      if (started && v < D) n_short++;
      due_q.push_back(tick_no + D);
      val_q.push_back(v);
      last_sense = tick_no;
      started = 1;
      n_sensed++;
      if (due_q.size() > max_inflight) max_inflight = due_q.size();
    end
    if (action) begin
      checks++;
      if (due_q.size() == 0) begin
        failures++; $display("%t: action with no product in transit", $time);
      end else begin
        int unsigned due;
        due = due_q.pop_front();
        last_val = val_q.pop_front();
        n_fired++;
        if (tick_no != due) begin
          failures++;
          $display("%t: product fired at tick %0d, due at %0d", $time, tick_no, due);
        end
      end
    end
    if (rpt_valid && rpt_ready) begin
      checks++;
      n_rpt++;
      if (rpt_value != W'(last_val)) begin
        failures++;
        $display("%t: report %0d, expected %0d", $time, rpt_value, last_val);
      end
    end
    if (overwrite) begin failures++; $display("%t: unexpected overwrite", $time); end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    first_value = W'(D); first_load = 1;
    @(negedge clk) first_load = 0;
    run_cmd = 1;
    @(negedge clk) run_cmd = 0;
    for (int p = 0; p < 400; p++) begin
      int unsigned gap;
      gap = (p % 50 < 25) ? $urandom_range(7, 12) : $urandom_range(7, 80);
      for (int g = 0; g < gap; g++) begin
        en_tick = 1;               // tick on clock 0 of each group of four
        @(negedge clk) en_tick = 0;
        repeat (3) @(negedge clk);
      end
      if (p % 4 == 0) begin        // sensor event on the same clock as a tick
        en_tick = 1; sen_pulse = 1;
        @(negedge clk) begin en_tick = 0; sen_pulse = 0; end
        repeat (3) @(negedge clk);
      end else begin               // sensor event between ticks
        sen_pulse = 1;
        @(negedge clk) sen_pulse = 0;
      end
    end
    // let every product reach the actuator
    repeat (D + 20) begin en_tick = 1; @(negedge clk) en_tick = 0; repeat (3) @(negedge clk); end
    repeat (HOLD + 5) @(negedge clk);
    checks++;
    if (n_fired != n_sensed || due_q.size() != 0) begin
      failures++; $display("sensed %0d products, fired %0d", n_sensed, n_fired);
    end
    checks++;
    if (n_rpt != n_fired - n_retrig) begin
      failures++; $display("reports %0d, expected %0d", n_rpt, n_fired - n_retrig);
    end
    checks++;
    if (n_capped == 0 || n_short == 0 || max_inflight < 7 || n_stopped == 0 || n_retrig == 0) begin
      failures++;
      $display("coverage: capped %0d short %0d in-flight %0d stopped %0d retrig %0d",
               n_capped, n_short, max_inflight, n_stopped, n_retrig);
    end
    $display("products %0d, gaps over D %0d, max in transit %0d, retriggers %0d",
             n_sensed, n_capped, max_inflight, n_retrig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
