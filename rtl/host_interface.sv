// host_interface: the RS-232C link to the PC.
//
// Made of the clock generator (baud_gen, 24.576 MHz / 2560 = 9600 b/s), the
// serial in/out part (uart_rx, uart_tx) and the serial-to-parallel part
// (host_protocol), which exchanges 8-bit data with the main control
// channels. The transmitter paces its bits with the clock generator's tick;
// the receiver times its samples from each start edge with a timer of its own,
// as the 1.5-bit start delay needs. See host_protocol for the command set.
module host_interface #(
  parameter int unsigned N_CH         = tc_pkg::N_CH,
  parameter int unsigned W            = tc_pkg::COUNT_W,
  parameter int unsigned CLKS_PER_BIT = tc_pkg::CLKS_PER_BIT
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            rxd,
  output logic            txd,
  output logic [W-1:0]    first_value,
  output logic [N_CH-1:0] first_load,
  output logic            run_cmd,
  input  logic [N_CH-1:0] rpt_valid,
  input  logic [W-1:0]    rpt_value [N_CH],
  output logic [N_CH-1:0] rpt_ready,
  output logic            frame_err
);

  logic       bit_tick;
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_valid, tx_ready;

  baud_gen #(.DIV(CLKS_PER_BIT)) u_clk_gen (
    .clk(clk), .rst(rst), .tick(bit_tick)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk(clk), .rst(rst), .rxd(rxd), .data(rx_data), .valid(rx_valid), .frame_err(frame_err)
  );

  uart_tx u_tx (
    .clk(clk), .rst(rst), .bit_tick(bit_tick), .data(tx_data), .valid(tx_valid),
    .ready(tx_ready), .txd(txd)
  );

  host_protocol #(.N_CH(N_CH), .W(W)) u_s2p (
    .clk         (clk),
    .rst         (rst),
    .rx_data     (rx_data),
    .rx_valid    (rx_valid),
    .rx_err      (frame_err),
    .tx_data     (tx_data),
    .tx_valid    (tx_valid),
    .tx_ready    (tx_ready),
    .first_value (first_value),
    .first_load  (first_load),
    .run_cmd     (run_cmd),
    .rpt_valid   (rpt_valid),
    .rpt_value   (rpt_value),
    .rpt_ready   (rpt_ready)
  );

endmodule
