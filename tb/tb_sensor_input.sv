// tb_sensor_input: checks the sensor filter accepts a High only after five
// consecutive High samples. A random mix of short noise pulses (1..4 clocks)
// and real pulses (5..12 clocks) is applied. After each clock the expected
// level is worked out from the input history: High when the input was High at
// the five sampling clocks two to six edges back (hist[2..6]) (two synchroniser stages). The
// number of sen_pulse events must equal the number of pulses of five clocks or
// more.
module tb_sensor_input;
  logic clk = 0, rst = 1;
  logic sensor_in = 0;
  logic sen_high, sen_pulse;
  int unsigned checks = 0, failures = 0;
  int unsigned long_pulses = 0, short_pulses = 0, pulses_seen = 0;
  logic hist [0:7];
  bit   expect_high;

  always #5 clk = ~clk;

  sensor_input dut (.clk(clk), .rst(rst), .sensor_in(sensor_in), .sen_high(sen_high), .sen_pulse(sen_pulse));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // History of the input as seen at each rising edge: hist[k] = value k edges ago.
  always @(posedge clk) begin
    for (int k = 7; k > 0; k--) hist[k] <= hist[k-1];
    hist[0] <= sensor_in;
    if (!rst && sen_pulse) pulses_seen++;
  end

  always @(negedge clk) if (!rst) begin
    expect_high = hist[2] && hist[3] && hist[4] && hist[5] && hist[6];
    checks++;
    if (sen_high !== expect_high) begin
      failures++;
      if (failures < 10) $display("%t: sen_high=%0d expected %0d", $time, sen_high, expect_high);
    end
  end

  initial begin
    for (int k = 0; k < 8; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int p = 0; p < 300; p++) begin
      int unsigned len;
      len = $urandom_range(1, 12);
      if (len >= 5) long_pulses++; else short_pulses++;
      @(negedge clk) sensor_in = 1;
      repeat (len - 1) @(negedge clk);
      @(negedge clk) sensor_in = 0;
      repeat ($urandom_range(1, 10)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (pulses_seen != long_pulses) begin
      failures++;
      $display("accepted %0d sensor events, expected %0d", pulses_seen, long_pulses);
    end
    checks++;
    if (short_pulses == 0) begin failures++; $display("no noise pulse applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
