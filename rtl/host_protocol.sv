// host_protocol: the serial-to-parallel part of the host interface.
//
// Receive side: bytes from uart_rx are parsed as commands (see tc_pkg). A
// set command and its three value bytes load the first value (the
// sensor-to-actuator distance in encoder counts) of one channel: first_value
// carries the value and first_load pulses for that channel. The start command
// pulses run_cmd for all channels. Each complete command is answered with
// RSP_ACK; an unknown command byte or a framing error reported by uart_rx is
// answered with RSP_NAK, and a command in progress is abandoned.
// Transmit side: a pending ACK/NAK is sent first; otherwise channel reports
// (rpt_valid/rpt_value) are taken in round-robin order, acknowledged with
// rpt_ready on the clock they are taken, and sent as four bytes: RPT_ACTION
// plus the channel number, then the 24-bit value, most significant byte first.
//
// That the PC sends first values and a start command and receives the
// distances and action endings is the controller's; the byte codes, framing,
// acknowledgements and arbitration are this design's choices.
module host_protocol #(
  parameter int unsigned N_CH = tc_pkg::N_CH,
  parameter int unsigned W    = tc_pkg::COUNT_W
) (
  input  logic            clk,
  input  logic            rst,
  // from uart_rx
  input  logic [7:0]      rx_data,
  input  logic            rx_valid,
  input  logic            rx_err,
  // to uart_tx
  output logic [7:0]      tx_data,
  output logic            tx_valid,
  input  logic            tx_ready,
  // to the main control channels
  output logic [W-1:0]    first_value,
  output logic [N_CH-1:0] first_load,
  output logic            run_cmd,
  // reports from the main control channels
  input  logic [N_CH-1:0] rpt_valid,
  input  logic [W-1:0]    rpt_value [N_CH],
  output logic [N_CH-1:0] rpt_ready
);

  import tc_pkg::*;

  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1;

  // ---------------- receive: command parser ----------------
  typedef enum logic {P_CMD, P_DATA} parse_state_t;

  parse_state_t pstate;
  logic [CHW-1:0] pch;
  logic [1:0]     pcnt;
  logic [15:0]    acc;
  logic           ack_req, nak_req;

  always_ff @(posedge clk) begin
    if (rst) begin
      pstate      <= P_CMD;
      pch         <= '0;
      pcnt        <= '0;
      acc         <= '0;
      first_value <= '0;
      first_load  <= '0;
      run_cmd     <= 1'b0;
      ack_req     <= 1'b0;
      nak_req     <= 1'b0;
    end else begin
      first_load <= '0;
      run_cmd    <= 1'b0;
      ack_req    <= 1'b0;
      nak_req    <= 1'b0;
      if (rx_err) begin
        pstate  <= P_CMD;
        nak_req <= 1'b1;
      end else if (rx_valid) begin
        unique case (pstate)
          P_CMD: begin
            if (rx_data[7:4] == CMD_SET_FIRST[7:4] && 32'(rx_data[3:0]) < N_CH) begin
              pch    <= CHW'(rx_data[3:0]);
              pcnt   <= '0;
              pstate <= P_DATA;
            end else if (rx_data == CMD_START) begin
              run_cmd <= 1'b1;
              ack_req <= 1'b1;
            end else begin
              nak_req <= 1'b1;
            end
          end
          P_DATA: begin
            acc  <= {acc[7:0], rx_data};
            pcnt <= pcnt + 1'b1;
            if (pcnt == 2'd2) begin
              first_value     <= W'({acc, rx_data});
              first_load[pch] <= 1'b1;
              ack_req         <= 1'b1;
              pstate          <= P_CMD;
            end
          end
          default: pstate <= P_CMD;
        endcase
      end
    end
  end

  // ---------------- transmit: responses and reports ----------------
  logic           resp_pend;
  logic [7:0]     resp_code;
  logic           sending;
  logic [1:0]     sidx;
  logic [31:0]    sbuf;
  logic [CHW-1:0] rr;
  logic           pick_ok;
  logic [CHW-1:0] pick;

  // Round-robin choice among the channels with a report, starting at rr.
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int k = 0; k < N_CH; k++) begin
      logic [CHW:0] c;
      c = {1'b0, rr} + (CHW+1)'(k);
      if (32'(c) >= N_CH) c = c - (CHW+1)'(N_CH);
      if (!pick_ok && rpt_valid[c[CHW-1:0]]) begin
        pick_ok = 1'b1;
        pick    = c[CHW-1:0];
      end
    end
  end

  logic take_report;
  assign take_report = !sending && !resp_pend && pick_ok && tx_ready;

  always_comb begin
    rpt_ready = '0;
    if (take_report) rpt_ready[pick] = 1'b1;
  end

  assign tx_valid = sending || resp_pend;
  assign tx_data  = sending ? sbuf[31:24] : resp_code;

  always_ff @(posedge clk) begin
    if (rst) begin
      resp_pend <= 1'b0;
      resp_code <= '0;
      sending   <= 1'b0;
      sidx      <= '0;
      sbuf      <= '0;
      rr        <= '0;
    end else begin
      if (sending) begin
        if (tx_ready) begin
          sbuf <= {sbuf[23:0], 8'h00};
          sidx <= sidx + 1'b1;
          if (sidx == 2'd3) sending <= 1'b0;
        end
      end else if (resp_pend) begin
        if (tx_ready) resp_pend <= 1'b0;
      end else if (take_report) begin
        sending <= 1'b1;
        sidx    <= '0;
        sbuf    <= {RPT_ACTION + 8'(pick), 24'(rpt_value[pick])};
        rr      <= (32'(pick) == N_CH - 1) ? '0 : pick + 1'b1;
      end
      // A new response request wins over one just sent.
      if (ack_req || nak_req) begin
        resp_pend <= 1'b1;
        resp_code <= nak_req ? RSP_NAK : RSP_ACK;
      end
    end
  end

  initial begin
    assert (W <= 24) else $error("first values travel as 24 bits");
    assert (N_CH >= 1 && N_CH <= 16) else $error("channel number travels in four bits");
  end

endmodule
