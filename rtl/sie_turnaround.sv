// Bus turn-around time-out. After the main FSM restarts it (when it starts
// waiting for a data packet or for an ACK), the block counts clocks during
// which the line rests in J with no packet being received; SE0 (an EOP) and
// any K restart the count. When the count reaches TIMEOUT_BITS bit times,
// `timeout` is raised and stays high until the next restart. USB 2.0 puts
// the device time-out between 16 and 18 bit times; 18 is used.
module sie_turnaround #(
  parameter int unsigned TIMEOUT_BITS = 18,
  parameter int unsigned CLKS_PER_BIT = 4,
  parameter bit          LOW_SPEED    = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       restart,
  input  logic [1:0] line_state,
  input  logic       rx_active,
  output logic       timeout
);
  localparam int unsigned LIMIT = TIMEOUT_BITS * CLKS_PER_BIT;
  localparam int unsigned W = $clog2(LIMIT + 1);
  logic [W-1:0] cnt;
  logic         idle_j;

  assign idle_j = (line_state == (LOW_SPEED ? 2'b10 : 2'b01)) && !rx_active;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin cnt <= '0; timeout <= 1'b0; end
    else if (restart) begin cnt <= '0; timeout <= 1'b0; end
    else if (!idle_j) cnt <= '0;
    else if (cnt == W'(LIMIT - 1)) timeout <= 1'b1;
    else cnt <= cnt + 1'b1;
endmodule
