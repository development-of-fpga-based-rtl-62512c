// tb_uart_tx: checks the serial transmitter. A bit tick comes every BIT
// clocks. Random bytes are offered with random gaps; a receiver in the
// testbench waits for each start edge, then samples the line in the middle of
// every bit and checks start '0', eight data bits least significant first,
// stop '1', and that the start bit lasts exactly BIT clocks. The line must
// stay High while idle.
module tb_uart_tx;
  localparam int BIT = 16;
  logic clk = 0, rst = 1;
  logic bit_tick = 0, valid = 0, ready, txd;
  logic [7:0] data = 0;
  int unsigned checks = 0, failures = 0, ncyc = 0, sent = 0, got = 0;
  logic [7:0] q[$];

  always #5 clk = ~clk;

  uart_tx dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    ncyc++;
    bit_tick <= (ncyc % BIT == 0);
  end

  // line receiver
  initial begin
    logic [7:0] b;
    int unsigned t0;
    @(negedge rst);
    forever begin
      @(negedge txd);
      t0 = ncyc;
      repeat (BIT / 2) @(posedge clk);
      checks++;
      if (txd !== 1'b0) begin failures++; $display("%t: start bit not low", $time); end
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        b[i] = txd;
      end
      repeat (BIT) @(posedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("%t: stop bit not high", $time); end
      checks++;
      if (q.size() == 0 || b !== q[0]) begin
        failures++; $display("%t: received %h, expected %h", $time, b, q.size() ? q[0] : 8'hxx);
      end
      if (q.size()) void'(q.pop_front());
      got++;
    end
  end

  // start-bit length
  initial begin
    int unsigned tf;
    @(negedge rst);
    forever begin
      @(negedge txd); tf = ncyc;
      @(posedge txd);
      if (ncyc - tf >= BIT) begin
        checks++;
        // the line goes High at the end of the start bit only when data bit 0 is 1
        if ((ncyc - tf) % BIT != 0) begin failures++; $display("%t: low run of %0d clocks", $time, ncyc - tf); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 60; n++) begin
      while (!ready) @(negedge clk);
      // ready is High here, so the byte is taken at the next rising edge
      data = 8'($urandom);
      valid = 1;
      q.push_back(data);
      @(negedge clk) valid = 0;
      sent++;
      checks++;
      if (ready) begin failures++; $display("%t: still ready after taking a byte", $time); end
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    while (!ready) @(negedge clk);
    repeat (2 * BIT) @(negedge clk);
    checks++;
    if (got != sent) begin failures++; $display("sent %0d bytes, received %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
