// Serial Interface Engine (handshake layer). Wires the unpacker, packer,
// main transaction FSM, bus turn-around time-out, timers and the
// reset/suspend FSM as in the SIE block diagram. Toward the PHY it is a UTMI
// interface, 8 bits wide, or 16 bits wide with DATA16 set: sie_utmi16 then
// turns words into the byte stream the packer and unpacker use. Toward the endpoints it offers the token bus (got_token,
// Token Info), a received-data stream gated to accepted packets, the
// transmit byte index and length ("Count total/curr"), EP Control
// (`stall_clr`), and takes the selected endpoint's EP Status, EP Mode and
// transmit data. The SIE runs on the PHY clock (48 MHz). The unpacker's
// error strobes are brought out for monitoring.
module usb_sie
  import usb_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 48_000_000,
  parameter bit          LOW_SPEED = 1'b0,
  parameter bit          DATA16    = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // UTMI
  input  logic [1:0]       line_state,
  input  logic             rx_active,
  input  logic             rx_valid,
  input  logic [7:0]       rx_data,
  input  logic             rx_valid_h,    // 16-bit mode only
  input  logic [7:0]       rx_data_h,
  input  logic             rx_error,
  output logic             tx_valid,
  output logic [7:0]       tx_data,
  output logic             tx_valid_h,    // 16-bit mode only
  output logic [7:0]       tx_data_h,
  input  logic             tx_ready,
  // device state
  input  logic [6:0]       dev_addr,
  output bus_state_t       bus_state,
  output logic             usb_rst,
  // endpoint side
  output logic             tok_valid,
  output logic [3:0]       tok_ep,
  output logic [3:0]       tok_pid,
  input  ep_status_t       ep_status,
  input  ep_mode_t         ep_mode,
  output logic             ep_rx_valid,
  output logic [7:0]       ep_rx_data,
  output logic             rx_ok,
  output logic             in_ok,
  output logic             stall_clr,
  input  logic [LEN_W-1:0] ep_tx_len,
  input  logic [7:0]       ep_tx_data,
  output logic [LEN_W-1:0] ep_tx_idx,
  // unpacker error strobes
  output logic             err_crc,
  output logic             err_pid,
  output logic             err_incomplete
);
  logic       got_pk, pk_err, d_valid, rx_en;
  logic [3:0] pk_pid, pk_ep, cur_pid, send_pid;
  logic [6:0] pk_addr;
  logic       send, pk_done, pk_busy, to_restart, timeout;
  logic       tmr_restart, t_2u5, t_100u, t_1m, t_3m;

  // byte streams between the packet logic and the UTMI port
  logic       b_rx_valid, b_tx_valid, b_tx_ready;
  logic [7:0] b_rx_data, b_tx_data;

  if (DATA16) begin : g_w16
    sie_utmi16 u_w16 (.clk, .rst_n,
      .ph_rx_valid(rx_valid), .ph_rx_valid_h(rx_valid_h), .ph_rx_data(rx_data),
      .ph_rx_data_h(rx_data_h), .ph_tx_valid(tx_valid), .ph_tx_valid_h(tx_valid_h),
      .ph_tx_data(tx_data), .ph_tx_data_h(tx_data_h), .ph_tx_ready(tx_ready),
      .b_rx_valid, .b_rx_data, .b_tx_valid, .b_tx_data, .b_tx_ready);
  end else begin : g_w8
    // 8-bit mode: RxValidH/RxDataH are not used
    assign b_rx_valid = rx_valid;
    assign b_rx_data  = rx_data;
    assign tx_valid   = b_tx_valid;
    assign tx_data    = b_tx_data;
    assign b_tx_ready = tx_ready;
    assign tx_valid_h = 1'b0;
    assign tx_data_h  = 8'h00;
  end

  sie_unpacker u_unpack (.clk, .rst_n, .rx_active, .rx_valid(b_rx_valid), .rx_data(b_rx_data), .rx_error,
    .cur_pid, .got_pk, .pk_err, .pk_pid, .pk_addr, .pk_ep, .d_valid, .d_data(ep_rx_data),
    .err_crc, .err_pid, .err_incomplete);

  sie_packer u_pack (.clk, .rst_n, .send, .pid(send_pid), .tx_len(ep_tx_len),
    .ep_data(ep_tx_data), .tx_idx(ep_tx_idx), .tx_valid(b_tx_valid), .tx_data(b_tx_data),
    .tx_ready(b_tx_ready),
    .busy(pk_busy), .done(pk_done));

  sie_main_fsm u_main (.clk, .rst_n, .usb_rst, .dev_addr, .got_pk, .pk_err, .pk_pid,
    .pk_addr, .pk_ep, .cur_pid, .rx_active, .send, .send_pid, .pk_done, .to_restart,
    .timeout, .tok_valid, .tok_ep, .tok_pid, .ep_status, .ep_mode, .rx_en, .rx_ok,
    .in_ok, .stall_clr);

  sie_turnaround #(.LOW_SPEED(LOW_SPEED)) u_to (.clk, .rst_n, .restart(to_restart),
    .line_state, .rx_active, .timeout);

  sie_timers #(.CLK_HZ(CLK_HZ)) u_tmr (.clk, .rst_n, .restart(tmr_restart),
    .t_2u5, .t_100u, .t_1m, .t_3m);

  sie_bus_fsm #(.LOW_SPEED(LOW_SPEED)) u_bus (.clk, .rst_n, .line_state, .t_2u5, .t_3m,
    .tmr_restart, .bus_state, .usb_rst);

  assign ep_rx_valid = d_valid && rx_en;

  // The packer must be idle whenever a new reply is started.
  a_send_idle: assert property (@(posedge clk) disable iff (!rst_n) send |-> !pk_busy);
endmodule
