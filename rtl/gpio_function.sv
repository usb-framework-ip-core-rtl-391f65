// Demonstration application behind EP1: a general-purpose I/O device that
// drives eight LEDs and reports eight switches/buttons. An OUT packet's
// first byte is staged and copied to the LEDs when the packet is committed
// (a corrupted or repeated packet leaves them unchanged). The IN side has a
// one-byte report, the switch state sampled when the report is read; it is
// offered only when the switches changed since the last acknowledged report
// (and once after reset), so the host is NAKed otherwise, as an interrupt
// endpoint does. The switches are synchronised with two flip-flops.
module gpio_function
  import usb_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       switches,
  output logic [7:0]       leds,
  // endpoint side
  output logic             in_ready,
  output logic [LEN_W-1:0] in_len,
  input  logic [LEN_W-1:0] in_idx,
  output logic [7:0]       in_data,
  input  logic             in_done,
  output logic             out_ready,
  input  logic             out_start,
  input  logic             out_valid,
  input  logic [7:0]       out_data,
  input  logic             out_commit
);
  logic [7:0] sw_s1, sw_s2, reported, staged;
  logic       pending, first;

  assign in_len    = LEN_W'(1);
  assign in_data   = sw_s2;
  assign in_ready  = pending;
  assign out_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sw_s1 <= '0; sw_s2 <= '0; reported <= '0; staged <= '0; leds <= '0;
      pending <= 1'b1; first <= 1'b0;
    end else begin
      sw_s1 <= switches; sw_s2 <= sw_s1;
      if (in_done) begin pending <= 1'b0; reported <= sw_s2; end
      else if (sw_s2 != reported) pending <= 1'b1;
      if (out_start) first <= 1'b1;
      if (out_valid && first) begin staged <= out_data; first <= 1'b0; end
      if (out_commit) leds <= staged;
    end

  logic unused;
  assign unused = ^in_idx;
endmodule
