// tb_uart_rx: checks the serial receiver at 64 clocks per bit. The testbench
// sends random bytes as start bit, eight data bits least significant first and
// stop bit, with random idle gaps. Between bytes it puts short Low glitches,
// shorter than the start-bit re-check delay, which must not produce a byte, and
// frames with a Low stop bit, which must raise frame_err and no byte. Each
// byte must arrive 9.5 bit times (+3 clocks) after its start edge.
module tb_uart_rx;
  localparam int BIT = 64;
  logic clk = 0, rst = 1;
  logic rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int unsigned checks = 0, failures = 0, ncyc = 0;
  int unsigned n_ok = 0, n_err = 0, n_glitch = 0, got_ok = 0, got_err = 0;
  int unsigned t_edge;
  logic [7:0] expect_b;
  bit expect_err;

  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(BIT)) dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) ncyc++;

  always @(posedge clk) if (!rst && (valid || frame_err)) begin
    checks++;
    if (valid) got_ok++; else got_err++;
    if (expect_err ? !frame_err : (!valid || data !== expect_b)) begin
      failures++;
      $display("%t: valid %0d data %h err %0d, expected %h err %0d", $time, valid, data, frame_err, expect_b, expect_err);
    end
    checks++;
    if (ncyc - t_edge < BIT * 19 / 2 + 1 || ncyc - t_edge > BIT * 19 / 2 + 5) begin
      failures++; $display("%t: byte after %0d clocks", $time, ncyc - t_edge);
    end
  end

  task automatic send(input logic [7:0] b, input bit good_stop);
    expect_b = b; expect_err = !good_stop;
    @(negedge clk) rxd = 0; t_edge = ncyc;
    repeat (BIT - 1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk) rxd = b[i];
      repeat (BIT - 1) @(negedge clk);
    end
    @(negedge clk) rxd = good_stop;
    repeat (BIT - 1) @(negedge clk);
    @(negedge clk) rxd = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (10) @(negedge clk);
    for (int n = 0; n < 80; n++) begin
      bit good;
      good = (n % 7 != 3);
      send(8'($urandom), good);
      if (good) n_ok++; else n_err++;
      repeat ($urandom_range(BIT, 3 * BIT)) @(negedge clk);
      if (n % 4 == 1) begin
        @(negedge clk) rxd = 0;
        repeat ($urandom_range(1, BIT / 4 - 4)) @(negedge clk);
        rxd = 1;
        n_glitch++;
        repeat (2 * BIT) @(negedge clk);
      end
    end
    repeat (2 * BIT) @(negedge clk);
    checks++;
    if (got_ok != n_ok || got_err != n_err) begin
      failures++; $display("bytes %0d/%0d, frame errors %0d/%0d", got_ok, n_ok, got_err, n_err);
    end
    $display("bytes %0d, framing errors %0d, glitches %0d", got_ok, got_err, n_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
