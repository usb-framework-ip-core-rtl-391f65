// Testbench for req_mux with three handlers: the lowest-numbered claiming
// handler wins and its length and data are routed; no claim gives none.
module tb_req_mux;
  localparam int WATCHDOG_CYCLES = 1000;
  localparam int N = 3;
  logic clk = 0;
  logic [N-1:0] claim_i, sel; logic [15:0] len_i [N]; logic [7:0] data_i [N];
  logic claim; logic [15:0] len; logic [7:0] data;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  req_mux #(.N(N)) dut (.claim_i, .len_i, .data_i, .sel, .claim, .len, .data);
  initial begin
    for (int r = 0; r < 50; r++) begin
      int w;
      w = -1;
      claim_i = N'($urandom);
      for (int i = 0; i < N; i++) begin len_i[i] = 16'($urandom); data_i[i] = 8'($urandom); end
      for (int i = N - 1; i >= 0; i--) if (claim_i[i]) w = i;
      #1;
      if (w < 0) check(!claim && sel == 0, "no claim");
      else check(claim && sel == N'(1 << w) && len == len_i[w] && data == data_i[w], "priority claim");
    end
    finish_tb();
  end
endmodule
