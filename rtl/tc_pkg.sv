// tc_pkg: constants and types shared by the timing controller.
//
// The clock, the baud rate, the 20-bit counter width, the eight distance
// buffers per channel and the three channels are the controller's own
// figures. The byte codes of the serial command set are this design's
// choice. The PC link carries no structure of its own beyond start bit, eight
// data bits and stop bit, so a small command set is defined here:
//
//   PC -> controller
//     CMD_SET_FIRST + ch, b2, b1, b0   first value (sensor-to-actuator distance
//                                      in encoder counts) of channel ch,
//                                      24-bit big-endian, low COUNT_W bits used
//     CMD_START                        start operating (all channels)
//   controller -> PC
//     RSP_ACK                          a command was accepted
//     RSP_NAK                          framing error or unknown byte: send again
//     RPT_ACTION + ch, b2, b1, b0      channel ch finished an actuator action;
//                                      the value is the buffered distance the
//                                      comparator matched for that product
package tc_pkg;

  localparam int unsigned CLK_HZ       = 24_576_000;
  localparam int unsigned BAUD         = 9_600;
  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;  // 2560, equation (1)

  localparam int unsigned COUNT_W = 20;   // Count1..Count3, Memory_x, First_value
  localparam int unsigned N_BUF   = 8;    // Memory_1 .. Memory_8
  localparam int unsigned N_CH    = 3;    // Controller 1..3 of the host program

  localparam int unsigned SENSOR_SAMPLES  = 5;  // sensor must stay High 5 clocks
  localparam int unsigned ENCODER_SAMPLES = 3;  // encoder level must hold 3 clocks

  // Actuator hold time counted by counter 3, in clock cycles (10 ms).
  localparam int unsigned HOLD_CYCLES = 245_760;

  typedef logic [COUNT_W-1:0] count_t;

  // Serial command set.
  localparam logic [7:0] CMD_SET_FIRST = 8'h10;  // + channel number
  localparam logic [7:0] CMD_START     = 8'h20;
  localparam logic [7:0] RPT_ACTION    = 8'h30;  // + channel number
  localparam logic [7:0] RSP_ACK       = 8'h06;
  localparam logic [7:0] RSP_NAK       = 8'h15;

endpackage
