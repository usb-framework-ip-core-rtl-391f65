// Testbench for sie_bus_fsm with sie_timers at 48 MHz: a short SE0 (EOP)
// is not a reset, 2.5 us of SE0 is; J for 3 ms is suspend and K resumes.
module tb_sie_bus_fsm;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 400000;
  logic clk = 0, rst_n = 0;
  logic [1:0] line_state = 2'b01;
  logic restart, t_2u5, t_100u, t_1m, t_3m, usb_rst;
  bus_state_t bus_state;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  sie_timers tmr (.clk, .rst_n, .restart, .t_2u5, .t_100u, .t_1m, .t_3m);
  sie_bus_fsm dut (.clk, .rst_n, .line_state, .t_2u5, .t_3m, .tmr_restart(restart),
    .bus_state, .usb_rst);
  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    check(bus_state == BUS_IDLE, "idle before reset");
    line_state <= 2'b00; repeat (8) @(posedge clk); line_state <= 2'b01; repeat (4) @(posedge clk);
    check(bus_state == BUS_IDLE && !usb_rst, "EOP-length SE0 is not a reset");
    line_state <= 2'b00; repeat (110) @(posedge clk);
    check(!usb_rst, "no reset before 2.5 us");
    repeat (20) @(posedge clk);
    check(usb_rst && bus_state == BUS_RESET, "reset after 2.5 us of SE0");
    line_state <= 2'b01; repeat (3) @(posedge clk);
    check(bus_state == BUS_ACTIVE && !usb_rst, "active after reset");
    repeat (143000) @(posedge clk);
    check(bus_state == BUS_ACTIVE, "not suspended before 3 ms");
    repeat (2000) @(posedge clk);
    check(bus_state == BUS_SUSPEND, "suspend after 3 ms of J");
    line_state <= 2'b10; repeat (3) @(posedge clk);
    check(bus_state == BUS_ACTIVE, "resume on K");
    finish_tb();
  end
endmodule
