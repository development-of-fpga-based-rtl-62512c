// tb_encoder_counter: checks the encoder filter and position counter.
// Phase 1 applies random levels lasting 1..6 clocks. The expected filtered level
// is tracked from the input history: it changes once the input has shown the
// other level at three sampling clocks in a row (two edges of synchroniser
// delay). Phase 2 applies 500 clean encoder periods with 1-2 clock glitches
// in them and checks the position counter advanced by exactly 500.
module tb_encoder_counter;
  logic clk = 0, rst = 1;
  logic encoder_in = 0;
  logic en_clk, en_tick;
  logic [19:0] position;
  int unsigned checks = 0, failures = 0, ticks_seen = 0;
  logic hist [0:7];
  logic model_level = 0;
  logic [19:0] pos_start;

  always #5 clk = ~clk;

  encoder_counter dut (.clk(clk), .rst(rst), .encoder_in(encoder_in), .en_clk(en_clk),
                       .en_tick(en_tick), .position(position));

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int k = 7; k > 0; k--) hist[k] <= hist[k-1];
    hist[0] <= encoder_in;
  end

  always @(negedge clk) if (!rst) begin
    // hist[2..4] are the three most recent samples the filter has taken.
    if (hist[2] != model_level && hist[3] != model_level && hist[4] != model_level)
      model_level = hist[2];
    checks++;
    if (en_clk !== model_level) begin
      failures++;
      if (failures < 10) $display("%t: en_clk=%0d expected %0d", $time, en_clk, model_level);
    end
    if (en_tick) ticks_seen++;
  end

  initial begin
    for (int k = 0; k < 8; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int p = 0; p < 2000; p++) begin
      encoder_in = ~encoder_in;
      repeat ($urandom_range(1, 6)) @(negedge clk);
    end
    encoder_in = 0;
    repeat (10) @(negedge clk);
    pos_start = position;
    for (int p = 0; p < 500; p++) begin
      encoder_in = 1;
      repeat ($urandom_range(4, 8)) @(negedge clk);
      if (p % 3 == 0) begin                       // glitch inside the High phase
        encoder_in = 0; repeat ($urandom_range(1, 2)) @(negedge clk);
        encoder_in = 1; repeat (4) @(negedge clk);
      end
      encoder_in = 0;
      repeat ($urandom_range(4, 8)) @(negedge clk);
      if (p % 5 == 0) begin                       // glitch inside the Low phase
        encoder_in = 1; repeat ($urandom_range(1, 2)) @(negedge clk);
        encoder_in = 0; repeat (4) @(negedge clk);
      end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (position - pos_start != 20'd500) begin
      failures++;
      $display("position advanced %0d, expected 500", position - pos_start);
    end
    checks++;
    if (position != 20'(ticks_seen)) begin
      failures++;
      $display("position %0d but %0d ticks", position, ticks_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
