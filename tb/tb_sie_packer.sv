// Testbench for sie_packer: handshakes and DATA0/DATA1 packets of random
// length from a model endpoint that answers each index one clock late. A
// model UTMI transmitter takes one byte every 32 clocks; the bytes are
// checked against the PID, payload and an independently computed CRC16.
module tb_sie_packer;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 60000;
  logic clk = 0, rst_n = 0, send = 0;
  logic [3:0] pid = 0;
  logic [LEN_W-1:0] tx_len = 0, tx_idx;
  logic [7:0] ep_data = 0, tx_data;
  logic tx_valid, tx_ready, busy, done;
  logic [7:0] mem [64];
  logic [7:0] out[$];
  int ndone = 0, rdy_cnt = 0;
  logic h_dp, h_dm, d_dp, d_dm, d_oe_n;
  `include "tb/tb_check.svh"
  `include "tb/usb_host_tasks.svh"
  always #5 clk = !clk;
  sie_packer dut (.clk, .rst_n, .send, .pid, .tx_len, .ep_data, .tx_idx, .tx_valid,
    .tx_data, .tx_ready, .busy, .done);
  always @(posedge clk) ep_data <= mem[tx_idx];
  assign tx_ready = tx_valid && (rdy_cnt == 31);
  always @(posedge clk) if (rst_n) begin
    rdy_cnt <= tx_valid ? (rdy_cnt + 1) % 32 : 0;
    if (tx_valid && tx_ready) out.push_back(tx_data);
    if (done) ndone++;
  end
  task automatic pkt(input logic [3:0] p, input int n);
    out.delete();
    pid <= p; tx_len <= LEN_W'(n); send <= 1; @(posedge clk); send <= 0;
    wait (done); @(posedge clk);
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (mem[i]) mem[i] = 8'($urandom);
    pkt(PID_ACK, 0);  check(out.size() == 1 && out[0] == 8'hD2, "ACK");
    pkt(PID_NAK, 0);  check(out.size() == 1 && out[0] == 8'h5A, "NAK");
    pkt(PID_STALL, 0); check(out.size() == 1 && out[0] == 8'h1E, "STALL");
    pkt(PID_NYET, 0); check(out.size() == 1 && out[0] == 8'h96, "NYET");
    for (int t = 0; t < 8; t++) begin
      automatic int n = (t == 0) ? 0 : $urandom_range(1, 64);
      automatic logic [7:0] d[] = new[n];
      logic [15:0] c;
      foreach (d[i]) d[i] = mem[i];
      c = h_crc16(d, n);
      pkt((t % 2) ? PID_DATA1 : PID_DATA0, n);
      check(out.size() == n + 3, "data packet length");
      check(out[0] == ((t % 2) ? 8'h4B : 8'hC3), "data PID");
      for (int i = 0; i < n && i + 1 < out.size(); i++) check(out[i + 1] == d[i], "payload");
      check(out.size() == n + 3 && out[n + 1] == c[7:0] && out[n + 2] == c[15:8], "CRC16");
    end
    repeat (2) @(posedge clk);
    check(ndone == 12, $sformatf("one done per packet (%0d)", ndone));
    finish_tb();
  end
endmodule
