// Testbench for usb_crc5: known USB token CRCs (addr 0 / ep 0 gives 0x02,
// i.e. the familiar token bytes xx 00 10) and random fields against a
// bit-serial reference; corrupted CRC fields must be rejected.
module tb_usb_crc5;
  localparam int WATCHDOG_CYCLES = 1000;
  logic clk = 0;
  logic [10:0] data; logic [4:0] crc_rx, crc; logic ok;
  `include "tb/tb_check.svh"
  `include "tb/usb_host_tasks.svh"
  logic h_dp, h_dm, d_dp, d_dm, d_oe_n;
  usb_crc5 dut (.data, .crc_rx, .crc, .ok);
  always #5 clk = !clk;
  initial begin
    data = 11'd0; crc_rx = 5'h02; #1;
    check(crc == 5'h02 && ok, "addr0 ep0 -> 0x02");
    data = {4'hA, 7'h3A}; crc_rx = 5'h07; #1;
    check(crc == 5'h07 && ok, "addr 3A ep A -> 0x07");
    for (int i = 0; i < 200; i++) begin
      data = 11'($urandom); crc_rx = h_crc5(data); #1;
      check(ok && crc == crc_rx, "random token CRC");
      crc_rx = crc_rx ^ 5'(1 << (i % 5)); #1;
      check(!ok, "corrupted CRC rejected");
    end
    finish_tb();
  end
endmodule
