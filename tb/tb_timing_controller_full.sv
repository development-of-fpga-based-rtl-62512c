// tb_timing_controller_full: one complete operation of the timing controller at
// its default sizes: 24.576 MHz clock, 9600 b/s serial link (2560 clocks per
// bit), 20-bit counters, eight buffers, three channels, 245,760-clock actuator
// hold. The PC model sends first values 16000, 19300 and 17500 encoder counts
// to channels 1..3 and the start command, checking each ACK. The encoder runs at
// 8 clocks per count. Each channel then sees four products, with gaps both
// shorter and longer than its first value. Checked: every product fires
// exactly its first value after it was sensed; the drive of an action that is
// not retriggered lasts 245,760 clocks; and the last report each channel
// sends the PC carries the distance buffered for its last product.
module tb_timing_controller_full;
  import tc_pkg::*;
  localparam int NCH = 3, EPER = 8, BIT = 2560, HOLD = 245_760;
  localparam int D [NCH] = '{16000, 19300, 17500};
  localparam int GAP [NCH][3] = '{'{3000, 9000, 20000}, '{35000, 1000, 5000}, '{8000, 18000, 2000}};

  logic clk = 0, rst = 1;
  logic [NCH-1:0] sensor = 0;
  logic encoder = 0, rxd, txd;
  logic [NCH-1:0] drive, action, store, overwrite;
  logic [19:0] position;

  int unsigned checks = 0, failures = 0, ncyc = 0;
  int unsigned due_q [NCH][$];
  int unsigned val_q [NCH][$];
  int unsigned last_val [NCH], n_fire [NCH], n_store [NCH], rise [NCH], n_hold_ok = 0;
  logic [19:0] last_ref [NCH];
  bit store_q [NCH], started [NCH], retrig [NCH];
  int unsigned rep_val [NCH];
  bit rep_seen [NCH];

  always #20ns clk = ~clk;   // 25 MHz stands in for 24.576 MHz; all timing is in clocks

  timing_controller dut (
    .clk(clk), .rst(rst), .sensor(sensor), .encoder(encoder), .rxd(rxd), .txd(txd),
    .drive(drive), .action(action), .store(store), .overwrite(overwrite), .position(position)
  );
  pc_model #(.BIT(BIT)) pc (.clk(clk), .txd(rxd), .rxd(txd));

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge rst);
    forever begin
      encoder = 1; repeat (EPER / 2) @(negedge clk);
      encoder = 0; repeat (EPER / 2) @(negedge clk);
    end
  end

  always @(posedge clk) if (!rst) begin
    ncyc++;
    for (int c = 0; c < NCH; c++) begin
      if (store_q[c]) begin
        int unsigned v;
        logic [19:0] gap;
        gap = position - last_ref[c];
        v = (!started[c] || 32'(gap) >= D[c]) ? D[c] : 32'(gap);
        due_q[c].push_back(32'(position + 20'(D[c])));
        val_q[c].push_back(v);
        last_ref[c] = position;
        started[c] = 1;
      end
      store_q[c] = store[c];
      if (store[c]) n_store[c]++;
      if (overwrite[c]) begin failures++; $display("%t: unexpected overwrite", $time); end
      if (action[c]) begin
        checks++;
        n_fire[c]++;
        if (drive[c]) retrig[c] = 1;
        if (due_q[c].size() == 0) begin failures++; $display("%t: channel %0d fired with nothing due", $time, c); end
        else begin
          int unsigned due;
          due = due_q[c].pop_front();
          last_val[c] = val_q[c].pop_front();
          if (position != 20'(due)) begin
            failures++; $display("%t: channel %0d fired at %0d, due %0d", $time, c, position, due);
          end
        end
      end
    end
  end

  // drive length of actions that were not retriggered
  for (genvar c = 0; c < NCH; c++) begin : g_hold
    bit rose = 0;
    always @(posedge drive[c]) if (!rst) begin rise[c] = ncyc; retrig[c] = 0; rose = 1; end
    always @(negedge drive[c]) if (!rst && rose && !retrig[c]) begin
      checks++;
      n_hold_ok++;
      if (ncyc - rise[c] != HOLD) begin
        failures++; $display("channel %0d drive lasted %0d clocks", c, ncyc - rise[c]);
      end
    end
  end

  task automatic expect_byte(input logic [7:0] b, input string what);
    int unsigned t;
    t = 0;
    while (pc.rx_q.size() == 0 && t < 40 * BIT) begin @(negedge clk); t++; end
    checks++;
    if (pc.rx_q.size() == 0) begin failures++; $display("%s: nothing received", what); end
    else begin
      logic [7:0] g;
      g = pc.rx_q.pop_front();
      if (g !== b) begin failures++; $display("%s: received %h, expected %h", what, g, b); end
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("failed: %s", what); end
  endtask

  task automatic products(input int c);
    for (int p = 0; p < 4; p++) begin
      if (p > 0) repeat (GAP[c][p-1] * EPER) @(negedge clk);
      @(negedge clk) sensor[c] = 1;
      repeat (20) @(negedge clk);
      sensor[c] = 0;
    end
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) begin
      last_val[c] = 0; n_fire[c] = 0; n_store[c] = 0; rise[c] = 0; last_ref[c] = 0;
      store_q[c] = 0; started[c] = 0; retrig[c] = 0; rep_val[c] = 0; rep_seen[c] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (2 * BIT) @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      pc.send_set(c, 24'(D[c]));
      expect_byte(RSP_ACK, "set first value");
    end
    pc.send_byte(CMD_START);
    expect_byte(RSP_ACK, "program start");

    fork
      products(0);
      products(1);
      products(2);
    join
    // wait for the last product to reach its actuator, the hold and the reports
    repeat (20000 * EPER + HOLD + 200 * BIT) @(negedge clk);

    while (pc.rx_q.size() >= 4) begin
      logic [7:0] h;
      logic [23:0] v;
      h = pc.rx_q.pop_front();
      v = {pc.rx_q.pop_front(), pc.rx_q.pop_front(), pc.rx_q.pop_front()};
      checks++;
      if (h[7:4] != RPT_ACTION[7:4] || 32'(h[3:0]) >= NCH) begin failures++; $display("bad report header %h", h); end
      else begin rep_val[h[1:0]] = 32'(v); rep_seen[h[1:0]] = 1; end
    end
    for (int c = 0; c < NCH; c++) begin
      check(n_store[c] == 4 && n_fire[c] == 4, $sformatf("channel %0d stored %0d fired %0d", c, n_store[c], n_fire[c]));
      check(rep_seen[c] && rep_val[c] == last_val[c],
            $sformatf("channel %0d last report %0d, expected %0d", c, rep_val[c], last_val[c]));
    end
    check(n_hold_ok > 0, "an action that was not retriggered");
    $display("fires %0d/%0d/%0d, last reports %0d/%0d/%0d, %0d clocks",
             n_fire[0], n_fire[1], n_fire[2], rep_val[0], rep_val[1], rep_val[2], ncyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
