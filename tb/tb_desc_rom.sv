// Testbench for desc_rom: one clock of read latency, and the descriptor
// headers (length, type) at the addresses listed in usb_desc_pkg.
module tb_desc_rom;
  import usb_desc_pkg::*;
  localparam int WATCHDOG_CYCLES = 1000;
  logic clk = 0; logic [5:0] addr = 0; logic [7:0] data;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  desc_rom dut (.clk, .addr, .data);
  task automatic rd(input logic [5:0] a, output logic [7:0] d);
    addr <= a; @(posedge clk); #1 d = data;
  endtask
  initial begin
    logic [7:0] d;
    rd(DEV_BASE, d);      check(d == 8'(DEV_LEN), "device bLength");
    rd(DEV_BASE + 1, d);  check(d == 8'h01, "device bDescriptorType");
    rd(CFG_BASE, d);      check(d == 8'h09, "config bLength");
    rd(CFG_BASE + 2, d);  check(d == 8'(CFG_LEN), "config wTotalLength");
    rd(CFG_BASE + 9, d);  check(d == 8'h09, "interface bLength");
    rd(CFG_BASE + 20, d); check(d == 8'h81, "EP1 IN address");
    rd(STR0_BASE, d);     check(d == 8'(STR0_LEN), "string 0 length");
    rd(STR1_BASE, d);     check(d == 8'(STR1_LEN), "string 1 length");
    rd(STR1_BASE + 2, d); check(d == "G", "string 1 text");
    addr <= 6'd7; @(posedge clk); addr <= 6'd1; #1;
    check(data == 8'h08, "data follows the address of the previous clock");
    finish_tb();
  end
endmodule
