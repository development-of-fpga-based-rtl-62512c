// tb_baud_gen: checks the clock generator gives one tick every 2560 clocks
// (24.576 MHz / 2560 = 9600 b/s) at its default, and every 7 clocks when
// set to 7.
module tb_baud_gen;
  logic clk = 0, rst = 1;
  logic tick, tick7;
  int unsigned checks = 0, failures = 0;
  int unsigned n = 0, last = 0, last7 = 0, seen = 0, seen7 = 0;

  always #5 clk = ~clk;

  baud_gen dut (.clk(clk), .rst(rst), .tick(tick));
  baud_gen #(.DIV(7)) dut7 (.clk(clk), .rst(rst), .tick(tick7));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    n++;
    if (tick) begin
      checks++;
      if (n - last != 2560) begin failures++; $display("tick spacing %0d, expected 2560", n - last); end
      last = n; seen++;
    end
    if (tick7) begin
      checks++;
      if (n - last7 != 7) begin failures++; $display("tick spacing %0d, expected 7", n - last7); end
      last7 = n; seen7++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    wait (seen == 20);
    checks++;
    if (seen7 < 7000) begin failures++; $display("too few DIV=7 ticks: %0d", seen7); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
