// Testbench for sie_unpacker driven at the UTMI receive interface: tokens
// with good and bad CRC5, data packets with good and bad CRC16 (payload
// delivered without the CRC bytes), handshakes, a bad PID, an incomplete
// token, a PHY error and a discarded SOF.
module tb_sie_unpacker;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 20000;
  logic clk = 0, rst_n = 0;
  logic rx_active = 0, rx_valid = 0, rx_error = 0;
  logic [7:0] rx_data = 0;
  logic [3:0] cur_pid, pk_pid, pk_ep; logic [6:0] pk_addr;
  logic got_pk, pk_err, d_valid, err_crc, err_pid, err_inc;
  logic [7:0] d_data;
  logic [7:0] got[$];
  int npk = 0;
  logic h_dp, h_dm, d_dp, d_dm, d_oe_n;
  `include "tb/tb_check.svh"
  `include "tb/usb_host_tasks.svh"
  always #5 clk = !clk;
  sie_unpacker dut (.clk, .rst_n, .rx_active, .rx_valid, .rx_data, .rx_error, .cur_pid,
    .got_pk, .pk_err, .pk_pid, .pk_addr, .pk_ep, .d_valid, .d_data, .err_crc, .err_pid,
    .err_incomplete(err_inc));
  always @(posedge clk) begin
    if (d_valid) got.push_back(d_data);
    if (got_pk) npk++;
  end

  task automatic utmi(input logic [7:0] b[], input bit perr = 0);
    got.delete();
    rx_active <= 1; repeat (8) @(posedge clk);
    foreach (b[i]) begin
      rx_valid <= 1; rx_data <= b[i]; @(posedge clk); rx_valid <= 0; repeat (3) @(posedge clk);
    end
    if (perr) rx_error <= 1;
    rx_active <= 0; @(posedge clk); rx_error <= 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic tok(input logic [3:0] pid, input logic [6:0] a, input logic [3:0] e, input bit bad = 0);
    logic [10:0] f = {e, a};
    logic [4:0] c = h_crc5(f) ^ 5'(bad);
    logic [7:0] b[] = '{{~pid, pid}, f[7:0], {c, f[10:8]}};
    utmi(b);
  endtask

  task automatic expect_pk(input logic [3:0] pid, input bit err, input string m);
    // got_pk pulses one clock after rx_active falls; sample the stored fields
    check(pk_pid == pid && pk_err == err, m);
  endtask

  initial begin
    logic [7:0] p[];
    int n0;
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      automatic logic [6:0] a = 7'($urandom); automatic logic [3:0] e = 4'($urandom);
      automatic logic [3:0] pid = (i % 3 == 0) ? PID_IN : (i % 3 == 1) ? PID_OUT : PID_SETUP;
      n0 = npk;
      tok(pid, a, e);
      check(npk == n0 + 1, "one got_pk per token");
      expect_pk(pid, 0, "good token");
      check(pk_addr == a && pk_ep == e, "token address/endpoint");
      tok(pid, a, e, 1);
      expect_pk(pid, 1, "bad CRC5 flagged");
    end
    for (int i = 0; i < 10; i++) begin
      automatic int n = $urandom_range(0, 12);
      automatic logic [7:0] d[] = new[n];
      logic [15:0] c;
      foreach (d[k]) d[k] = 8'($urandom);
      c = h_crc16(d, n);
      p = new[n + 3];
      p[0] = (i % 2) ? 8'h4B : 8'hC3;
      foreach (d[k]) p[k + 1] = d[k];
      p[n + 1] = c[7:0]; p[n + 2] = c[15:8];
      utmi(p);
      expect_pk((i % 2) ? PID_DATA1 : PID_DATA0, 0, "good data packet");
      check(got.size() == n, $sformatf("payload length %0d vs %0d", got.size(), n));
      foreach (d[k]) if (k < got.size()) check(got[k] == d[k], "payload byte");
      p[1] = p[1] ^ 8'h10;
      utmi(p);
      expect_pk((i % 2) ? PID_DATA1 : PID_DATA0, 1, "bad CRC16 flagged");
    end
    p = '{8'hD2}; utmi(p); expect_pk(PID_ACK, 0, "ACK");
    p = '{8'h5A}; utmi(p); expect_pk(PID_NAK, 0, "NAK");
    p = '{8'h1E}; utmi(p); expect_pk(PID_STALL, 0, "STALL");
    p = '{8'hD3, 8'h00, 8'h00}; utmi(p); check(pk_err, "bad PID check flagged");
    p = '{8'h69, 8'h00}; utmi(p); check(pk_err, "incomplete token flagged");
    p = '{8'hD2}; utmi(p, 1); check(pk_err, "PHY error flagged");
    n0 = npk;
    p = '{8'hA5, 8'h00, 8'h00}; utmi(p); check(npk == n0, "SOF discarded");
    finish_tb();
  end
endmodule
