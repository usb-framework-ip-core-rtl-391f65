// Testbench for sie_timers at 48 MHz: each flag must rise exactly at
// 2.5 us (120 clocks), 100 us (4800), 1 ms (48000) and 3 ms (144000) after a
// restart, and a restart must clear them.
module tb_sie_timers;
  localparam int WATCHDOG_CYCLES = 400000;
  logic clk = 0, rst_n = 0, restart = 0;
  logic t_2u5, t_100u, t_1m, t_3m;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  sie_timers dut (.clk, .rst_n, .restart, .t_2u5, .t_100u, .t_1m, .t_3m);
  task automatic measure(ref logic f, input int exp, input string m);
    int n = 0;
    restart <= 1; @(posedge clk); restart <= 0;
    #1; while (!f) begin @(posedge clk); #1; n++; end
    check(n == exp, $sformatf("%s after %0d clocks (expected %0d)", m, n, exp));
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    measure(t_2u5, 120, "2.5 us");
    measure(t_100u, 4800, "100 us");
    measure(t_1m, 48000, "1 ms");
    measure(t_3m, 144000, "3 ms");
    check(t_2u5 && t_100u && t_1m, "earlier flags stay set");
    restart <= 1; @(posedge clk); restart <= 0; @(posedge clk);
    check(!t_2u5 && !t_3m, "restart clears");
    finish_tb();
  end
endmodule
