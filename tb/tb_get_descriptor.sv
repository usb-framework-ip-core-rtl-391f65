// Testbench for get_descriptor with desc_rom: claims only standard
// GET_DESCRIPTOR requests for existing descriptors, reports their lengths
// and returns the bytes by offset one clock later.
module tb_get_descriptor;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 2000;
  logic clk = 0;
  setup_t setup = '0;
  logic [15:0] rd_addr = 0, len;
  logic claim; logic [5:0] rom_addr; logic [7:0] rom_data, data;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  get_descriptor dut (.setup, .rd_addr, .claim, .len, .rom_addr, .rom_data, .data);
  desc_rom rom (.clk, .addr(rom_addr), .data(rom_data));
  task automatic req(input logic [7:0] rt, input logic [7:0] rq, input logic [15:0] v);
    setup = '{wLength: 16'd255, wIndex: 16'd0, wValue: v, bRequest: rq, bmRequestType: rt}; #1;
  endtask
  task automatic rd(input int a, output logic [7:0] d);
    rd_addr <= 16'(a); @(posedge clk); #1 d = data;
  endtask
  initial begin
    logic [7:0] d;
    req(8'h80, REQ_GET_DESCRIPTOR, 16'h0100); check(claim && len == 18, "device descriptor claimed, 18 bytes");
    rd(0, d); check(d == 8'h12, "device byte 0"); rd(7, d); check(d == 8'h08, "device byte 7 (MPS)");
    req(8'h80, REQ_GET_DESCRIPTOR, 16'h0200); check(claim && len == 32, "configuration, 32 bytes");
    rd(1, d); check(d == 8'h02, "configuration byte 1"); rd(31, d); check(d == 8'h0A, "last byte");
    req(8'h80, REQ_GET_DESCRIPTOR, 16'h0300); check(claim && len == 4, "string 0");
    req(8'h80, REQ_GET_DESCRIPTOR, 16'h0301); check(claim && len == 10, "string 1");
    rd(4, d); check(d == "P", "string 1 text");
    req(8'h80, REQ_GET_DESCRIPTOR, 16'h0302); check(!claim, "string 2 not claimed");
    req(8'h80, REQ_GET_DESCRIPTOR, 16'h0600); check(!claim, "qualifier not claimed");
    req(8'h81, REQ_GET_DESCRIPTOR, 16'h2200); check(!claim, "interface recipient not claimed");
    req(8'h80, REQ_GET_STATUS, 16'h0100); check(!claim, "other request not claimed");
    finish_tb();
  end
endmodule
