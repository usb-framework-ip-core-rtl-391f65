// Testbench for usb_sie behind a usb_phy, driven by the host model on the
// line. A model endpoint (address 0x21, endpoint 2) keeps its own toggles:
// SETUP and OUT data must reach it byte for byte with rx_ok, IN must return
// its 5-byte packet with the right DATA PID and CRC, the host's ACK must
// produce in_ok, and a bus reset must raise usb_rst.
module tb_usb_sie;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 60000;
  logic clk = 0, rst_n = 0;
  logic h_dp = 1, h_dm = 0, d_dp, d_dm, d_oe_n, bus_dp, bus_dm;
  logic [1:0] line_state;
  logic tx_valid, tx_ready, rx_active, rx_valid, rx_error, es, est, ea;
  logic [7:0] tx_data, rx_data;
  bus_state_t bus_state;
  logic usb_rst, tok_valid, ep_rx_valid, rx_ok, in_ok, stall_clr, ec, ep, ei;
  logic [3:0] tok_ep, tok_pid;
  logic [7:0] ep_rx_data, ep_tx_data;
  logic [LEN_W-1:0] ep_tx_idx;
  ep_status_t ep_status;
  ep_mode_t ep_mode;
  logic tog_in = 0, tog_out = 0;
  logic [7:0] got[$];
  int n_rxok = 0, n_inok = 0;
  `include "tb/tb_check.svh"
  logic       rx_vh, tx_vh;   // 8-bit mode: unused
  logic [7:0] rx_dh, tx_dh;
  `include "tb/usb_host_tasks.svh"
  always #5 clk = !clk;
  assign bus_dp = d_oe_n ? h_dp : d_dp;
  assign bus_dm = d_oe_n ? h_dm : d_dm;
  usb_phy phy (.clk, .rst_n, .dp_i(bus_dp), .dm_i(bus_dm), .dp_o(d_dp), .dm_o(d_dm), .oe_n(d_oe_n),
    .line_state, .tx_valid, .tx_data, .tx_valid_h(tx_vh), .tx_data_h(tx_dh), .tx_ready,
    .rx_active, .rx_valid, .rx_data, .rx_valid_h(rx_vh), .rx_data_h(rx_dh), .rx_error,
    .err_sync(es), .err_stuff(est), .err_align(ea));
  usb_sie dut (.clk, .rst_n, .line_state, .rx_active, .rx_valid, .rx_data, .rx_valid_h(rx_vh),
    .rx_data_h(rx_dh), .rx_error, .tx_valid, .tx_data, .tx_valid_h(tx_vh), .tx_data_h(tx_dh), .tx_ready, .dev_addr(7'h21), .bus_state, .usb_rst, .tok_valid,
    .tok_ep, .tok_pid, .ep_status, .ep_mode, .ep_rx_valid, .ep_rx_data, .rx_ok, .in_ok,
    .stall_clr, .ep_tx_len(LEN_W'(5)), .ep_tx_data, .ep_tx_idx, .err_crc(ec), .err_pid(ep),
    .err_incomplete(ei));
  assign ep_mode = (tok_ep == 2) ? '{1'b1, 1'b1, 1'b1} : '0;
  assign ep_status = '{stall: 1'b0, ready: 1'b1, toggle: (tok_pid == PID_IN) ? tog_in : tog_out};
  assign ep_tx_data = 8'hA0 + 8'(ep_tx_idx);
  always @(posedge clk) if (rst_n) begin
    if (ep_rx_valid) got.push_back(ep_rx_data);
    if (rx_ok) begin n_rxok++; if (tok_pid == PID_OUT) tog_out <= !tog_out; end
    if (in_ok) begin n_inok++; tog_in <= !tog_in; end
  end
  initial begin
    logic [7:0] r[$], d[];
    int n;
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);
    // SETUP
    d = '{8'h80, 8'h06, 8'h00, 8'h01, 8'h00, 8'h00, 8'h12, 8'h00};
    got.delete();
    h_token(PID_SETUP, 7'h21, 2); repeat (8) @(posedge clk);
    h_data(PID_DATA0, d, 8); h_recv(r, n);
    check(n == 1 && r[0] == 8'hD2, "SETUP ACKed");
    check(got.size() == 8 && got[0] == 8'h80 && got[7] == 8'h00 && got[6] == 8'h12, "SETUP bytes delivered");
    check(n_rxok == 1, "rx_ok for SETUP");
    // IN twice, toggles 0 then 1
    for (int k = 0; k < 2; k++) begin
      automatic logic [7:0] p[] = new[5];
      foreach (p[i]) p[i] = 8'hA0 + 8'(i);
      h_token(PID_IN, 7'h21, 2); h_recv(r, n);
      check(n == 8 && r[0] == (k ? 8'h4B : 8'hC3), "IN data PID");
      check(n == 8 && r[1] == 8'hA0 && r[5] == 8'hA4 && {r[7], r[6]} == h_crc16(p, 5), "IN payload and CRC");
      repeat (8) @(posedge clk); h_handshake(PID_ACK); repeat (10) @(posedge clk);
      check(n_inok == k + 1, "in_ok after ACK");
    end
    // OUT data
    got.delete();
    d = '{8'h01, 8'h02, 8'h03};
    h_token(PID_OUT, 7'h21, 2); repeat (8) @(posedge clk);
    h_data(PID_DATA0, d, 3); h_recv(r, n);
    check(n == 1 && r[0] == 8'hD2 && got.size() == 3 && got[2] == 8'h03 && n_rxok == 2, "OUT data ACKed and delivered");
    // endpoint 3 is not served: no reply
    h_token(PID_IN, 7'h21, 3); h_recv(r, n, 200);
    check(n == -1, "unsupported endpoint not answered");
    // bus reset
    h_dp = 0; h_dm = 0; repeat (130) @(posedge clk);
    check(usb_rst && bus_state == BUS_RESET, "bus reset");
    h_dp = 1; repeat (5) @(posedge clk);
    check(!usb_rst, "reset ends");
    finish_tb();
  end
endmodule
