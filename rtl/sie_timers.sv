// SIE timers: one counter, restarted by `restart`, that raises sticky flags
// once 2.5 us (reset detection), 100 us and 1 ms (high-speed negotiation)
// and 3 ms (suspend) have elapsed since the restart. The four times are the
// SIE's; deriving them from one counter and CLK_HZ is this design's choice.
// The counter saturates at 3 ms.
module sie_timers #(
  parameter int unsigned CLK_HZ = 48_000_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  output logic t_2u5,
  output logic t_100u,
  output logic t_1m,
  output logic t_3m
);
  localparam longint unsigned C2U5 = longint'(CLK_HZ) * 5 / 2_000_000;
  localparam longint unsigned C100U = longint'(CLK_HZ) / 10_000;
  localparam longint unsigned C1M  = longint'(CLK_HZ) / 1_000;
  localparam longint unsigned C3M  = longint'(CLK_HZ) * 3 / 1_000;
  localparam int unsigned W = $clog2(C3M + 1);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= '0;
    else if (restart) cnt <= '0;
    else if (cnt != W'(C3M)) cnt <= cnt + 1'b1;

  assign t_2u5  = (cnt >= W'(C2U5));
  assign t_100u = (cnt >= W'(C100U));
  assign t_1m   = (cnt >= W'(C1M));
  assign t_3m   = (cnt == W'(C3M));
endmodule
