// Testbench for usb_phy in loopback: a second PHY instance is the far end.
// Bytes sent through one PHY's UTMI transmit interface must arrive on the
// other PHY's receive interface, and the transmitting PHY's own receiver
// must stay idle (half duplex blanking). A second pair built for low speed
// (J = D- high) repeats the loopback on its own line, and the first bit it
// drives after going active must be the SYNC's leading K (D+ high).
module tb_usb_phy;
  localparam int WATCHDOG_CYCLES = 40000;
  logic clk = 0, rst_n = 0;
  logic a_dp, a_dm, a_oe_n, b_dp, b_dm, b_oe_n, l_dp, l_dm;
  logic [1:0] a_ls, b_ls;
  logic a_txv = 0, a_txr, b_txr;
  logic [7:0] a_txd = 0;
  logic a_act, a_v, a_e, b_act, b_v, b_e;
  logic [7:0] a_d, b_d;
  logic [2:0] a_err, b_err;
  logic a_vh, b_vh, s_vh, t_vh;
  logic [7:0] a_dh, b_dh, s_dh, t_dh;
  logic [7:0] got[$];
  int a_seen = 0;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  assign l_dp = !a_oe_n ? a_dp : 1'b1;
  assign l_dm = !a_oe_n ? a_dm : 1'b0;
  usb_phy ua (.clk, .rst_n, .dp_i(l_dp), .dm_i(l_dm), .dp_o(a_dp), .dm_o(a_dm), .oe_n(a_oe_n),
    .line_state(a_ls), .tx_valid(a_txv), .tx_data(a_txd), .tx_valid_h(1'b0), .tx_data_h(8'h00), .tx_ready(a_txr), .rx_active(a_act),
    .rx_valid(a_v), .rx_data(a_d), .rx_valid_h(a_vh), .rx_data_h(a_dh), .rx_error(a_e), .err_sync(a_err[2]), .err_stuff(a_err[1]), .err_align(a_err[0]));
  usb_phy ub (.clk, .rst_n, .dp_i(l_dp), .dm_i(l_dm), .dp_o(b_dp), .dm_o(b_dm), .oe_n(b_oe_n),
    .line_state(b_ls), .tx_valid(1'b0), .tx_data(8'h00), .tx_valid_h(1'b0), .tx_data_h(8'h00), .tx_ready(b_txr), .rx_active(b_act),
    .rx_valid(b_v), .rx_data(b_d), .rx_valid_h(b_vh), .rx_data_h(b_dh), .rx_error(b_e), .err_sync(b_err[2]), .err_stuff(b_err[1]), .err_align(b_err[0]));
  // low-speed pair; the idle line is pulled to the low-speed J
  logic s_dp, s_dm, s_oe_n, t_dp, t_dm, t_oe_n, m_dp, m_dm;
  logic [1:0] s_ls, t_ls;
  logic s_txv = 0, s_txr, t_txr, s_act, s_v, s_e, t_act, t_v, t_e;
  logic [7:0] s_txd = 0, s_d, t_d;
  logic [2:0] s_err, t_err;
  logic [7:0] ls_got[$];
  assign m_dp = !s_oe_n ? s_dp : 1'b0;
  assign m_dm = !s_oe_n ? s_dm : 1'b1;
  usb_phy #(.LOW_SPEED(1)) us (.clk, .rst_n, .dp_i(m_dp), .dm_i(m_dm), .dp_o(s_dp), .dm_o(s_dm), .oe_n(s_oe_n),
    .line_state(s_ls), .tx_valid(s_txv), .tx_data(s_txd), .tx_valid_h(1'b0), .tx_data_h(8'h00), .tx_ready(s_txr), .rx_active(s_act),
    .rx_valid(s_v), .rx_data(s_d), .rx_valid_h(s_vh), .rx_data_h(s_dh), .rx_error(s_e), .err_sync(s_err[2]), .err_stuff(s_err[1]), .err_align(s_err[0]));
  usb_phy #(.LOW_SPEED(1)) ut (.clk, .rst_n, .dp_i(m_dp), .dm_i(m_dm), .dp_o(t_dp), .dm_o(t_dm), .oe_n(t_oe_n),
    .line_state(t_ls), .tx_valid(1'b0), .tx_data(8'h00), .tx_valid_h(1'b0), .tx_data_h(8'h00), .tx_ready(t_txr), .rx_active(t_act),
    .rx_valid(t_v), .rx_data(t_d), .rx_valid_h(t_vh), .rx_data_h(t_dh), .rx_error(t_e), .err_sync(t_err[2]), .err_stuff(t_err[1]), .err_align(t_err[0]));
  always @(posedge clk) if (rst_n && t_v) ls_got.push_back(t_d);

  always @(posedge clk) if (rst_n) begin
    if (b_v) got.push_back(b_d);
    if (a_act) a_seen++;
  end
  initial begin
    logic [7:0] b[];
    repeat (4) @(posedge clk); rst_n = 1; repeat (4) @(posedge clk);
    for (int t = 0; t < 5; t++) begin
      b = new[1 + $urandom_range(0, 10)];
      foreach (b[i]) b[i] = (t == 0) ? 8'hFF : 8'($urandom);
      got.delete();
      foreach (b[i]) begin
        a_txv <= 1; a_txd <= b[i];
        do @(posedge clk); while (!a_txr);
      end
      a_txv <= 0;
      wait (!a_oe_n); wait (a_oe_n); repeat (12) @(posedge clk);
      check(got.size() == b.size(), "loopback length");
      foreach (b[i]) if (i < got.size()) check(got[i] == b[i], "loopback byte");
      check(!b_act && !b_e, "far end idle, no error");
    end
    check(a_seen == 0, "transmitter's own receiver blanked");
    // low speed: one packet through the low-speed pair
    begin
      automatic logic [7:0] lb[4] = '{8'hC3, 8'hFF, 8'h00, 8'h5A};
      foreach (lb[i]) begin
        s_txv <= 1; s_txd <= lb[i];
        do @(posedge clk); while (!s_txr);
      end
      s_txv <= 0;
      wait (!s_oe_n); #1;
      check(s_dp == 1'b1 && s_dm == 1'b0, "low speed: first bit is K (D+ high)");
      wait (s_oe_n); repeat (12) @(posedge clk);
      check(ls_got.size() == 4, "low speed loopback length");
      foreach (lb[i]) if (i < ls_got.size()) check(ls_got[i] == lb[i], "low speed loopback byte");
      check(!t_act && !t_e, "low speed far end idle, no error");
    end
    finish_tb();
  end
endmodule
