// tb_memory_register: checks the memory register part against a reference model.
// The testbench plays counter 1 (counting encoder ticks under the block's
// clear / enable) and the comparator (random completion signals). A reference
// model tracks, from the ticks and sensor events alone, the distance each
// buffer should hold: First_value for the first product and for any product
// more than First_value behind the previous one, else the encoder ticks since
// the previous product. Buffers, flags, pointer and overwrite are compared
// every clock. Sensor events before the start command must be ignored.
module tb_memory_register;
  localparam int W = 20, N = 8;
  logic clk = 0, rst = 1;
  logic [W-1:0] first_value_in = 0;
  logic first_load = 0, run_cmd = 0, sen_pulse = 0, tick = 0;
  logic [W-1:0] count1 = 0;
  logic cnt1_clr, cnt1_en;
  logic [W-1:0] mem [N];
  logic [N-1:0] ac_bits, cmp_done = 0, memory_ch;
  logic first_value_valid, running, start_bit, store, overwrite;

  int unsigned checks = 0, failures = 0;
  int unsigned n_store = 0, n_over = 0, n_capped = 0, n_wrap = 0;

  // reference state
  logic [W-1:0] r_fv = 0, r_dist = 0;
  logic [W-1:0] r_mem [N];
  logic [N-1:0] r_ac = 0;
  int unsigned  r_ptr = 0;
  bit           r_run = 0, r_started = 0;

  always #5 clk = ~clk;

  memory_register dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // counter 1, outside the block
  always @(posedge clk) begin
    if (cnt1_clr) count1 <= '0;
    else if (cnt1_en && tick) count1 <= count1 + 1'b1;
  end

  // reference model
  always @(posedge clk) if (!rst) begin
    bit st;
    st = r_run && sen_pulse;
    if (first_load) r_fv <= first_value_in;
    if (run_cmd) r_run <= 1;
    r_ac <= (r_ac & ~cmp_done);
    if (st) begin
      logic [W-1:0] v, d;
      // a tick on the store clock belongs to the distance just ended
      d = r_dist + ((tick && r_dist < r_fv) ? 1 : 0);
      v = (r_started && d < r_fv) ? d : r_fv;
      if (r_started && d >= r_fv) n_capped++;
      if (r_ac[r_ptr]) n_over++;
      r_mem[r_ptr] <= v;
      r_ac <= (r_ac & ~cmp_done) | (N'(1) << r_ptr);
      if (r_ptr == N - 1) n_wrap++;
      r_ptr <= (r_ptr + 1) % N;
      r_started <= 1;
      r_dist <= 0;
      n_store++;
    end else if (r_started && tick && r_dist < r_fv) begin
      r_dist <= r_dist + 1;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (memory_ch !== (N'(1) << r_ptr) || ac_bits !== r_ac) begin
      failures++;
      if (failures < 10) $display("%t: ptr %b/%0d ac %b/%b", $time, memory_ch, r_ptr, ac_bits, r_ac);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (mem[i] !== r_mem[i]) begin
        failures++;
        if (failures < 10) $display("%t: mem[%0d]=%0d expected %0d", $time, i, mem[i], r_mem[i]);
      end
    end
  end

  always @(posedge clk) if (!rst && overwrite) n_over--;

  initial begin
    for (int i = 0; i < N; i++) r_mem[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // First value loaded, but no start command yet: sensor events are ignored.
    first_value_in = 20'd60; first_load = 1;
    @(negedge clk) first_load = 0;
    repeat (3) begin sen_pulse = 1; @(negedge clk) sen_pulse = 0; repeat (5) @(negedge clk); end
    checks++;
    if (ac_bits != 0 || start_bit) begin failures++; $display("stored before start command"); end
    run_cmd = 1;
    @(negedge clk) run_cmd = 0;
    for (int n = 0; n < 20000; n++) begin
      tick      = (n % 2 == 0);
      sen_pulse = ($urandom_range(0, 99) < 2);
      cmp_done  = ($urandom_range(0, 99) < 3) ? (N'(1) << $urandom_range(0, N - 1)) : '0;
      if (n == 10000) begin first_value_in = 20'd25; first_load = 1; end
      else first_load = 0;
      @(negedge clk);
    end
    sen_pulse = 0; cmp_done = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_store < 100 || n_capped == 0 || n_wrap == 0) begin
      failures++;
      $display("coverage: stores %0d capped %0d wraps %0d", n_store, n_capped, n_wrap);
    end
    checks++;
    if (n_over != 0) begin failures++; $display("overwrite flag count off by %0d", n_over); end
    $display("stores %0d, capped at first value %0d, ring wraps %0d", n_store, n_capped, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
