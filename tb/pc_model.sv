// pc_model: behavioural model of the host PC's serial port, for testbenches.
// It sends bytes on txd as start bit, eight data bits (least significant first)
// and stop bit, BIT clocks per bit, and can also send a frame with a Low stop
// bit or a short Low glitch. A receiver on rxd waits for each start edge,
// samples every bit in its middle and appends good bytes to rx_q; frames with
// a Low stop bit are counted in rx_frame_errors.
module pc_model #(
  parameter int unsigned BIT = 2560
) (
  input  logic clk,
  output logic txd,
  input  logic rxd
);
  import tc_pkg::*;

  logic [7:0]  rx_q[$];
  int unsigned rx_frame_errors = 0;
  int unsigned rx_count = 0;

  initial txd = 1'b1;

  task automatic send_frame(input logic [7:0] b, input bit good_stop);
    @(negedge clk) txd = 1'b0;
    repeat (BIT - 1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk) txd = b[i];
      repeat (BIT - 1) @(negedge clk);
    end
    @(negedge clk) txd = good_stop;
    repeat (BIT - 1) @(negedge clk);
    @(negedge clk) txd = 1'b1;
    repeat (BIT) @(negedge clk);
  endtask

  task automatic send_byte(input logic [7:0] b);
    send_frame(b, 1'b1);
  endtask

  task automatic send_glitch(input int unsigned clocks);
    @(negedge clk) txd = 1'b0;
    repeat (clocks) @(negedge clk);
    txd = 1'b1;
    repeat (2 * BIT) @(negedge clk);
  endtask

  task automatic send_set(input int unsigned ch, input logic [23:0] value);
    send_byte(CMD_SET_FIRST + 8'(ch));
    send_byte(value[23:16]);
    send_byte(value[15:8]);
    send_byte(value[7:0]);
  endtask

  // receiver
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge rxd);
      repeat (BIT / 2) @(posedge clk);
      if (rxd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (BIT) @(posedge clk);
          b[i] = rxd;
        end
        repeat (BIT) @(posedge clk);
        if (rxd) begin rx_q.push_back(b); rx_count++; end
        else rx_frame_errors++;
      end
    end
  end
endmodule
