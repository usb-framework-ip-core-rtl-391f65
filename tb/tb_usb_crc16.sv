// Testbench for usb_crc16: the CRC of "123456789" (0xB4C8 for the USB
// CRC16), the 8-byte GET_DESCRIPTOR SETUP packet 80 06 00 01 00 00 40 00
// (CRC bytes DD 94), and the residual check after appending the CRC.
module tb_usb_crc16;
  localparam int WATCHDOG_CYCLES = 2000;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0] data = 0; logic [15:0] crc; logic ok;
  `include "tb/tb_check.svh"
  usb_crc16 dut (.clk, .rst_n, .clr, .en, .data, .crc, .ok);
  always #5 clk = !clk;
  task automatic feed(input logic [7:0] b);
    en <= 1; data <= b; @(posedge clk);
  endtask
  initial begin
    logic [7:0] s[8] = '{8'h80, 8'h06, 8'h00, 8'h01, 8'h00, 8'h00, 8'h40, 8'h00};
    @(posedge clk); rst_n <= 1; @(posedge clk);
    clr <= 1; @(posedge clk); clr <= 0;
    for (int i = 0; i < 9; i++) feed(8'h31 + 8'(i));
    en <= 0;
    @(posedge clk); check(crc == 16'hB4C8, $sformatf("check value %h", crc));
    clr <= 1; @(posedge clk); clr <= 0;
    foreach (s[i]) feed(s[i]);
    en <= 0;
    @(posedge clk); check(crc == 16'h94DD, $sformatf("setup crc %h", crc));
    check(!ok, "no residual before CRC bytes");
    feed(8'hDD); feed(8'h94); en <= 0; @(posedge clk);
    check(ok, "residual after CRC bytes");
    clr <= 1; @(posedge clk); clr <= 0; @(posedge clk);
    check(crc == 16'h0000, "empty packet CRC is 0000");
    finish_tb();
  end
endmodule
