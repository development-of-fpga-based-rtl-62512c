// tb_host_interface: checks the host interface over the serial line at 32
// clocks per bit. A PC model sends set commands and the start command and
// receives the replies. Checked: the loaded channel and value, run_cmd, the
// ACK after each command, that a glitch on the line is ignored, that a frame
// with a Low stop bit raises frame_err and is answered with NAK, and that a
// channel report arrives at the PC as its four bytes.
module tb_host_interface;
  import tc_pkg::*;
  localparam int N_CH = 3, W = 20, BIT = 32;
  logic clk = 0, rst = 1;
  logic rxd, txd, run_cmd, frame_err;
  logic [W-1:0] first_value;
  logic [N_CH-1:0] first_load, rpt_valid = 0, rpt_ready;
  logic [W-1:0] rpt_value [N_CH];
  int unsigned checks = 0, failures = 0, n_runs = 0, n_ferr = 0;
  logic [W-1:0] loaded [N_CH];
  int unsigned loads [N_CH];

  always #5 clk = ~clk;

  host_interface #(.CLKS_PER_BIT(BIT)) dut (.*);
  pc_model #(.BIT(BIT)) pc (.clk(clk), .txd(rxd), .rxd(txd));

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < N_CH; c++)
      if (first_load[c]) begin loaded[c] = first_value; loads[c]++; end
    if (run_cmd) n_runs++;
    if (frame_err) n_ferr++;
    for (int c = 0; c < N_CH; c++) if (rpt_ready[c]) rpt_valid[c] <= 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("failed: %s", what); end
  endtask

  task automatic expect_byte(input logic [7:0] b, input string what);
    int unsigned t;
    t = 0;
    while (pc.rx_q.size() == 0 && t < 40 * BIT) begin @(negedge clk); t++; end
    checks++;
    if (pc.rx_q.size() == 0) begin failures++; $display("%s: nothing received, expected %h", what, b); end
    else begin
      logic [7:0] g;
      g = pc.rx_q.pop_front();
      if (g !== b) begin failures++; $display("%s: received %h, expected %h", what, g, b); end
    end
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) begin loaded[c] = 0; loads[c] = 0; rpt_value[c] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5 * BIT) @(negedge clk);

    pc.send_set(1, 24'd19300);
    expect_byte(RSP_ACK, "set ch1");
    check(loaded[1] == 20'd19300 && loads[1] == 1 && loads[0] == 0 && loads[2] == 0, "ch1 loaded with 19300");

    pc.send_glitch(BIT / 8);
    pc.send_byte(CMD_START);
    expect_byte(RSP_ACK, "start");
    check(n_runs == 1, "run_cmd once");

    pc.send_frame(8'h55, 1'b0);
    expect_byte(RSP_NAK, "framing error");
    check(n_ferr == 1, "frame_err once");

    @(negedge clk);
    rpt_value[2] = 20'd17500; rpt_valid[2] = 1'b1;
    expect_byte(RPT_ACTION + 8'd2, "report header");
    expect_byte(8'h00, "report b2");
    expect_byte(8'h44, "report b1");
    expect_byte(8'h5C, "report b0");
    repeat (20 * BIT) @(negedge clk);
    check(pc.rx_q.size() == 0 && pc.rx_frame_errors == 0, "nothing extra on the line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
