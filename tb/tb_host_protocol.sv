// tb_host_protocol: checks the serial-to-parallel part with byte-level
// stimulus. Received bytes are fed directly; the transmitter is stood in for by
// a byte sink that is busy a random time after each byte. Checked: set
// commands load the right channel with the 20-bit value, the start command
// pulses run_cmd, each command is acknowledged, unknown bytes, a bad channel
// number and framing errors are answered NAK (a framing error also abandons a
// half-received command), and channel reports go out as four bytes in
// round-robin order.
module tb_host_protocol;
  import tc_pkg::*;
  localparam int N_CH = 3, W = 20;
  logic clk = 0, rst = 1;
  logic [7:0] rx_data = 0, tx_data;
  logic rx_valid = 0, rx_err = 0, tx_valid, tx_ready = 1;
  logic [W-1:0] first_value;
  logic [N_CH-1:0] first_load, rpt_valid = 0, rpt_ready;
  logic run_cmd;
  logic [W-1:0] rpt_value [N_CH];
  int unsigned checks = 0, failures = 0, busy = 0, n_runs = 0;
  logic [7:0] out_q[$];
  logic [W-1:0] loaded [N_CH];
  int unsigned loads [N_CH];

  always #5 clk = ~clk;

  host_protocol dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // byte sink standing in for the transmitter
  always @(posedge clk) if (!rst) begin
    if (tx_valid && tx_ready) begin
      out_q.push_back(tx_data);
      tx_ready <= 0;
      busy = $urandom_range(1, 20);
    end else if (!tx_ready) begin
      if (busy == 0) tx_ready <= 1; else busy--;
    end
    for (int c = 0; c < N_CH; c++)
      if (first_load[c]) begin loaded[c] = first_value; loads[c]++; end
    if (run_cmd) n_runs++;
    for (int c = 0; c < N_CH; c++)
      if (rpt_ready[c]) begin
        if (!rpt_valid[c]) begin failures++; $display("%t: ready without report", $time); end
        rpt_valid[c] <= 0;
      end
  end

  task automatic rx(input logic [7:0] b);
    @(negedge clk) rx_data = b; rx_valid = 1;
    @(negedge clk) rx_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  task automatic framing_error();
    @(negedge clk) rx_err = 1;
    @(negedge clk) rx_err = 0;
    repeat (5) @(negedge clk);
  endtask

  task automatic expect_out(input logic [7:0] b, input string what);
    int unsigned t;
    t = 0;
    while (out_q.size() == 0 && t < 2000) begin @(negedge clk); t++; end
    checks++;
    if (out_q.size() == 0) begin failures++; $display("%s: nothing sent, expected %h", what, b); end
    else begin
      logic [7:0] g;
      g = out_q.pop_front();
      if (g !== b) begin failures++; $display("%s: sent %h, expected %h", what, g, b); end
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("failed: %s", what); end
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) begin loaded[c] = 0; loads[c] = 0; rpt_value[c] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    rx(CMD_SET_FIRST + 8'd0); rx(8'h01); rx(8'h23); rx(8'h45);
    expect_out(RSP_ACK, "set ch0");
    check(loaded[0] == 20'h12345 && loads[0] == 1 && loads[1] == 0, "ch0 first value 0x12345");

    rx(CMD_SET_FIRST + 8'd2); rx(8'hFF); rx(8'hFF); rx(8'hFF);
    expect_out(RSP_ACK, "set ch2");
    check(loaded[2] == 20'hFFFFF && loads[2] == 1, "ch2 first value truncated to 20 bits");

    rx(CMD_SET_FIRST + 8'd3);
    expect_out(RSP_NAK, "channel 3 does not exist");
    rx(8'h99);
    expect_out(RSP_NAK, "unknown byte");

    rx(CMD_SET_FIRST + 8'd1); rx(8'h00);
    framing_error();
    expect_out(RSP_NAK, "framing error");
    rx(CMD_START);
    expect_out(RSP_ACK, "start");
    check(n_runs == 1 && loads[1] == 0, "start after abandoned set is a command");

    rx(CMD_SET_FIRST + 8'd1); rx(8'h00); rx(8'h3E); rx(8'h80);
    expect_out(RSP_ACK, "set ch1");
    check(loaded[1] == 20'd16000 && loads[1] == 1, "ch1 first value 16000");

    // three reports at once: sent in channel order 0, 1, 2
    @(negedge clk);
    rpt_value[0] = 20'd16000; rpt_value[1] = 20'd19300; rpt_value[2] = 20'd17500;
    rpt_valid = 3'b111;
    for (int c = 0; c < 3; c++) begin
      logic [23:0] v;
      v = 24'(rpt_value[c]);
      expect_out(RPT_ACTION + 8'(c), "report header");
      expect_out(v[23:16], "report byte 2");
      expect_out(v[15:8], "report byte 1");
      expect_out(v[7:0], "report byte 0");
    end
    // channel 2 went last, so channel 0 is served before channel 2 next time
    @(negedge clk);
    rpt_value[2] = 20'd5; rpt_value[0] = 20'd7;
    rpt_valid = 3'b101;
    expect_out(RPT_ACTION + 8'd0, "round robin header");
    expect_out(8'h00, "rr b2"); expect_out(8'h00, "rr b1"); expect_out(8'h07, "rr b0");
    expect_out(RPT_ACTION + 8'd2, "round robin second");
    expect_out(8'h00, "rr b2"); expect_out(8'h00, "rr b1"); expect_out(8'h05, "rr b0");
    repeat (50) @(negedge clk);
    check(out_q.size() == 0 && rpt_valid == 0, "nothing extra sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
