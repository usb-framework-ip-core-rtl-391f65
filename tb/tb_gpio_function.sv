// Testbench for gpio_function: LEDs change only on commit, with the first
// byte of the packet; the switch report is offered once after reset, then
// only after a change, and is withdrawn when acknowledged.
module tb_gpio_function;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 2000;
  logic clk = 0, rst_n = 0;
  logic [7:0] switches = 8'h33, leds, in_data, out_data = 0;
  logic in_ready, out_ready, in_done = 0, out_start = 0, out_valid = 0, out_commit = 0;
  logic [LEN_W-1:0] in_len;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  gpio_function dut (.clk, .rst_n, .switches, .leds, .in_ready, .in_len, .in_idx(LEN_W'(0)),
    .in_data, .in_done, .out_ready, .out_start, .out_valid, .out_data, .out_commit);
  task automatic pulse(ref logic s); #1 s = 1; @(posedge clk); #1 s = 0; @(posedge clk); endtask
  task automatic outb(input logic [7:0] b); out_data <= b; pulse(out_valid); endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1; repeat (4) @(posedge clk);
    check(in_ready && in_len == 1 && in_data == 8'h33 && out_ready, "initial report offered");
    pulse(in_done); @(posedge clk);
    check(!in_ready, "report withdrawn after ACK");
    repeat (5) @(posedge clk); check(!in_ready, "no report without change");
    switches = 8'h34; repeat (4) @(posedge clk);
    check(in_ready && in_data == 8'h34, "report after change");
    pulse(out_start); outb(8'hC1); outb(8'h99);
    check(leds == 8'h00, "LEDs unchanged before commit");
    pulse(out_commit); check(leds == 8'hC1, "LEDs take the first byte on commit");
    pulse(out_start); outb(8'h5E);
    check(leds == 8'hC1, "uncommitted packet ignored");
    finish_tb();
  end
endmodule
