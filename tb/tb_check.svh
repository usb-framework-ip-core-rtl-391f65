// Common check counter and watchdog for the unit testbenches. The including
// module declares `logic clk` and sets WATCHDOG_CYCLES with a localparam.
int checks = 0, failures = 0;

task automatic check(input bit c, input string m);
  checks++;
  if (!c) begin failures++; $display("FAIL: %s", m); end
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask

initial begin
  repeat (WATCHDOG_CYCLES) @(posedge clk);
  failures++;
  $display("watchdog expired");
  finish_tb();
end
