// Testbench for sie_turnaround: after a restart the time-out must fire after
// 18 bit times (72 clocks) of idle J, not before; SE0, K and an active
// receiver restart the count.
module tb_sie_turnaround;
  localparam int WATCHDOG_CYCLES = 5000;
  logic clk = 0, rst_n = 0, restart = 0, rx_active = 0, timeout;
  logic [1:0] line_state = 2'b01;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  sie_turnaround dut (.clk, .rst_n, .restart, .line_state, .rx_active, .timeout);
  initial begin
    int n;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    restart <= 1; @(posedge clk); restart <= 0;
    #1; n = 0; while (!timeout) begin @(posedge clk); #1; n++; end
    check(n == 72, $sformatf("time-out after %0d clocks", n));
    restart <= 1; @(posedge clk); restart <= 0;
    repeat (60) @(posedge clk);
    line_state <= 2'b00; repeat (8) @(posedge clk); line_state <= 2'b01;
    repeat (60) @(posedge clk);
    check(!timeout, "SE0 restarts the count");
    line_state <= 2'b10; @(posedge clk); line_state <= 2'b01;
    rx_active <= 1; repeat (200) @(posedge clk);
    check(!timeout, "no time-out while a packet is received");
    rx_active <= 0;
    #1; n = 0; while (!timeout) begin @(posedge clk); #1; n++; end
    check(n == 72, $sformatf("time-out after packet %0d clocks", n));
    repeat (5) @(posedge clk);
    check(timeout, "time-out is sticky");
    finish_tb();
  end
endmodule
