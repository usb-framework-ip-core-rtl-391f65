// Reset/suspend state machine of the SIE. It watches LineState and restarts
// the shared timers whenever the line changes between SE0, J and anything
// else. SE0 held for 2.5 us is a bus reset (state BUS_RESET, `usb_rst` high
// until SE0 ends, then BUS_ACTIVE); J held for 3 ms is suspend (BUS_SUSPEND,
// left on any other line state). Before the first reset the state is
// BUS_IDLE. The times are the SIE's; the full-to-high-speed negotiation this
// machine performs in a high-speed configuration is not part of this
// full-speed-only design, so the 100 us and 1 ms timer flags are unused.
module sie_bus_fsm
  import usb_pkg::*;
#(
  parameter bit LOW_SPEED = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] line_state,
  input  logic       t_2u5,
  input  logic       t_3m,
  output logic       tmr_restart,
  output bus_state_t bus_state,
  output logic       usb_rst
);
  logic [1:0] cls, cls_q;   // 0: SE0, 1: J, 2: other
  logic [1:0] j_code;
  assign j_code = LOW_SPEED ? 2'b10 : 2'b01;
  assign cls = (line_state == 2'b00) ? 2'd0 : (line_state == j_code) ? 2'd1 : 2'd2;
  assign tmr_restart = (cls != cls_q);
  assign usb_rst = (bus_state == BUS_RESET);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin cls_q <= 2'd1; bus_state <= BUS_IDLE; end
    else begin
      cls_q <= cls;
      if (!tmr_restart) begin
        if (cls == 2'd0 && t_2u5) bus_state <= BUS_RESET;
        else if (cls == 2'd1 && t_3m) bus_state <= BUS_SUSPEND;
      end
      if (bus_state == BUS_RESET && cls != 2'd0) bus_state <= BUS_ACTIVE;
      if (bus_state == BUS_SUSPEND && cls != 2'd1) bus_state <= BUS_ACTIVE;
    end
endmodule
