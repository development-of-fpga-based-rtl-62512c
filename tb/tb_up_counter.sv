// tb_up_counter: self-checking test of the 20-bit up counter.
// Drives random clear / enable / tick patterns into a default (20-bit) counter
// and a 4-bit one, compares both with a reference count every clock, and
// checks the 4-bit one wraps from 15 to 0.
module tb_up_counter;
  logic clk = 0, rst = 1;
  logic clr, en, tick;
  logic [19:0] count;
  logic [3:0]  count4;
  int unsigned checks = 0, failures = 0, wraps = 0;
  logic [19:0] ref20;
  logic [3:0]  ref4;

  always #5 clk = ~clk;

  up_counter dut (.clk(clk), .rst(rst), .clr(clr), .en(en), .tick(tick), .count(count));
  up_counter #(.W(4)) dut4 (.clk(clk), .rst(rst), .clr(clr), .en(en), .tick(tick), .count(count4));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; en = 0; tick = 0; ref20 = 0; ref4 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (count !== ref20 || count4 !== ref4) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d/%0d expected %0d/%0d", n, count, count4, ref20, ref4);
      end
      clr  = ($urandom_range(0, 99) < 2);
      en   = ($urandom_range(0, 99) < 80);
      tick = ($urandom_range(0, 99) < 70);
      if (clr) begin ref20 = 0; ref4 = 0; end
      else if (en && tick) begin
        ref20 = ref20 + 1;
        if (ref4 == 4'd15) wraps++;
        ref4 = ref4 + 1;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap-around seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
