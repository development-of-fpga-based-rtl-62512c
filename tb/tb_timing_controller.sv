// tb_timing_controller: end-to-end test of the timing controller, at 16 clocks
// per serial bit and a 60-clock actuator hold so that it runs quickly.
// A PC model configures the three channels (first values 60, 45, 90 encoder
// counts) and starts them; an encoder of 8 clocks per count runs throughout,
// with glitches; the three sensors see products at random gaps, with noise
// pulses in between. Checked and counted:
//   * sensor events before the start command and noise pulses are ignored;
//   * every accepted product fires its channel's actuator exactly D encoder
//     counts after it was sensed (measured with the encoder position output,
//     itself checked against the number of encoder periods generated);
//   * first products, gaps shorter and longer than D (counter 1 stops),
//     buffer-ring wrap-around, drive retriggering, reports to the PC,
//     serial glitch rejection, framing error NAK, and finally an overwrite
//     when more than eight products are in transit on channel 2.
module tb_timing_controller;
  import tc_pkg::*;
  localparam int BIT = 16, HOLD = 60, NCH = 3, EPER = 8;
  localparam int D [NCH] = '{60, 45, 90};

  logic clk = 0, rst = 1;
  logic [NCH-1:0] sensor = 0;
  logic encoder = 0, rxd, txd;
  logic [NCH-1:0] drive, action, store, overwrite;
  logic [19:0] position;

  int unsigned checks = 0, failures = 0;
  int unsigned enc_periods = 0;
  bit enc_run = 1, enc_glitch = 1;
  int unsigned n_store [NCH], n_fire [NCH], n_valid [NCH], n_rep [NCH];
  int unsigned n_capped = 0, n_short = 0, n_wrap = 0, n_retrig = 0, n_over = 0, n_enc_glitch = 0;
  int unsigned n_sen_noise = 0, n_first = 0;
  int unsigned due_q [NCH][$];
  bit timing_checked [NCH];
  logic [19:0] last_store_pos [NCH];
  bit seen_store [NCH];
  bit store_q [NCH];

  always #5 clk = ~clk;

  timing_controller #(.CLKS_PER_BIT(BIT), .HOLD_CYCLES(HOLD)) dut (
    .clk(clk), .rst(rst), .sensor(sensor), .encoder(encoder), .rxd(rxd), .txd(txd),
    .drive(drive), .action(action), .store(store), .overwrite(overwrite), .position(position)
  );
  pc_model #(.BIT(BIT)) pc (.clk(clk), .txd(rxd), .rxd(txd));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encoder: 4 clocks High, 4 Low; every 16th High phase is 3 High, a 1-clock
  // Low glitch, then 4 High
  initial begin
    @(negedge rst);
    forever begin
      if (enc_run) begin
        encoder = 1;
        if (enc_glitch && enc_periods % 16 == 5) begin
          repeat (3) @(negedge clk);
          encoder = 0; @(negedge clk);
          encoder = 1; repeat (4) @(negedge clk);
          n_enc_glitch++;
        end else repeat (EPER / 2) @(negedge clk);
        encoder = 0;
        enc_periods++;
        repeat (EPER / 2) @(negedge clk);
      end else @(negedge clk);
    end
  end

  // watch the channels
  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < NCH; c++) begin
      // A product is sensed at the encoder position reached by the end of
      // its store clock, so the due position is taken one clock later.
      if (store_q[c]) due_q[c].push_back(position + 20'(D[c]));
      store_q[c] = store[c];
      if (store[c]) begin
        n_store[c]++;
        if (!seen_store[c]) n_first++;
        else if (position - last_store_pos[c] >= 20'(D[c])) n_capped++;
        else n_short++;
        if (n_store[c] % 8 == 0) n_wrap++;
        seen_store[c] = 1;
        last_store_pos[c] = position;
      end
      if (overwrite[c]) begin n_over++; timing_checked[c] = 0; end
      if (action[c]) begin
        n_fire[c]++;
        if (drive[c]) n_retrig++;
        if (due_q[c].size() != 0) begin
          logic [19:0] due;
          due = due_q[c].pop_front();
          if (timing_checked[c]) begin
            checks++;
            if (position != due) begin
              failures++;
              $display("%t: channel %0d fired at position %0d, due %0d", $time, c, position, due);
            end
          end
        end
      end
    end
  end

  task automatic pulse(input int c, input int unsigned len);
    @(negedge clk) sensor[c] = 1;
    repeat (len) @(negedge clk);
    sensor[c] = 0;
  endtask

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

  // products on one channel: random gaps, each sensor pulse 10 clocks,
  // with a 2-clock noise pulse now and then
  task automatic products(input int c, input int unsigned count, input int unsigned gmin, input int unsigned gmax);
    for (int p = 0; p < count; p++) begin
      repeat ($urandom_range(gmin, gmax) * EPER) @(negedge clk);
      if (p % 3 == 1) begin
        pulse(c, 2); n_sen_noise++;
        repeat (10) @(negedge clk);
      end
      pulse(c, 10);
      n_valid[c]++;
    end
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) begin
      n_store[c] = 0; n_fire[c] = 0; n_valid[c] = 0; n_rep[c] = 0;
      timing_checked[c] = 1; seen_store[c] = 0; store_q[c] = 0; last_store_pos[c] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (4 * BIT) @(negedge clk);

    // a product before the controller is configured and started: ignored
    pulse(0, 10);
    for (int c = 0; c < NCH; c++) begin
      pc.send_set(c, 24'(D[c]));
      expect_byte(RSP_ACK, "set");
    end
    pc.send_glitch(2);
    pc.send_frame(8'hA5, 1'b0);
    expect_byte(RSP_NAK, "framing error");
    pc.send_byte(CMD_START);
    expect_byte(RSP_ACK, "start");
    check(n_store[0] == 0, "sensor ignored before start");

    // normal operation on all three channels at once
    fork
      products(0, 40, 3, 90);
      products(1, 40, 6, 70);
      products(2, 40, 12, 150);
    join
    repeat ((90 + 10) * EPER + HOLD) @(negedge clk);

    // two products 3 counts apart on channel 1: the second fires while the
    // first one's drive is still on
    pulse(1, 10); n_valid[1]++;
    repeat (3 * EPER - 10) @(negedge clk);
    pulse(1, 10); n_valid[1]++;
    repeat ((90 + 10) * EPER + HOLD) @(negedge clk);

    // overwrite: eleven products 1 count apart on channel 2
    for (int p = 0; p < 11; p++) begin
      pulse(2, 10); n_valid[2]++;
      repeat (EPER - 10 + EPER) @(negedge clk);
    end
    repeat ((90 + 10) * EPER + HOLD) @(negedge clk);

    // collect reports (they are 4 bytes each)
    repeat (200 * BIT) @(negedge clk);
    while (pc.rx_q.size() >= 4) begin
      logic [7:0] h;
      logic [23:0] v;
      h = pc.rx_q.pop_front();
      v = {pc.rx_q.pop_front(), pc.rx_q.pop_front(), pc.rx_q.pop_front()};
      checks++;
      if (h[7:4] != RPT_ACTION[7:4] || h[3:0] >= NCH) begin
        failures++; $display("bad report header %h", h);
      end else begin
        n_rep[h[3:0]]++;
        if (v > 24'(D[h[3:0]])) begin failures++; $display("report %0d exceeds D on channel %0d", v, h[3:0]); end
      end
    end

    for (int c = 0; c < NCH; c++) begin
      check(n_store[c] == n_valid[c], $sformatf("channel %0d stored %0d of %0d products", c, n_store[c], n_valid[c]));
      check(c == 2 || n_fire[c] == n_store[c], $sformatf("channel %0d fired %0d of %0d", c, n_fire[c], n_store[c]));
      check(n_rep[c] > 0, $sformatf("channel %0d reports", c));
    end
    check(position == 20'(enc_periods), $sformatf("position %0d, encoder periods %0d", position, enc_periods));

    // every mechanism must have happened
    check(n_first == NCH, "first product on each channel");
    check(n_short > 0, "gap shorter than D");
    check(n_capped > 0, "gap longer than D (counter 1 stopped)");
    check(n_wrap > 0, "buffer ring wrapped");
    check(n_retrig > 0, "drive retriggered");
    check(n_over > 0, "buffer overwritten");
    check(n_enc_glitch > 0 && n_sen_noise > 0, "noise applied");
    $display("first %0d short %0d capped %0d wraps %0d retrig %0d overwrite %0d enc-glitch %0d sensor-noise %0d",
             n_first, n_short, n_capped, n_wrap, n_retrig, n_over, n_enc_glitch, n_sen_noise);
    $display("fires %0d/%0d/%0d reports %0d/%0d/%0d", n_fire[0], n_fire[1], n_fire[2], n_rep[0], n_rep[1], n_rep[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
