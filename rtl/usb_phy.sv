// UTMI-style full/low-speed PHY: the receive and transmit sections of the
// PHY block diagram sharing one D+/D- pair. While the transmitter drives the
// line (/OE low) the receiver is held idle, since USB is half duplex. The
// external driver or resistors (electric layer) sit outside this module:
// D+/D- come in and go out as separate signals with an output enable.
// Interface and timing are those of phy_rx and phy_tx; DATA16 selects the
// 16-bit UTMI data bus (TxValidH/TxDataH, RxValidH/RxDataH) in both.
module usb_phy #(
  parameter bit LOW_SPEED = 1'b0,
  parameter bit DATA16    = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dp_i,
  input  logic       dm_i,
  output logic       dp_o,
  output logic       dm_o,
  output logic       oe_n,
  output logic [1:0] line_state,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  input  logic       tx_valid_h,
  input  logic [7:0] tx_data_h,
  output logic       tx_ready,
  output logic       rx_active,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_valid_h,
  output logic [7:0] rx_data_h,
  output logic       rx_error,
  output logic       err_sync,
  output logic       err_stuff,
  output logic       err_align
);
  logic tx_active;

  phy_tx #(.LOW_SPEED(LOW_SPEED), .DATA16(DATA16)) u_tx (
    .clk, .rst_n, .tx_valid, .tx_data, .tx_valid_h, .tx_data_h, .tx_ready,
    .dp(dp_o), .dm(dm_o), .oe_n, .tx_active);

  phy_rx #(.LOW_SPEED(LOW_SPEED), .DATA16(DATA16)) u_rx (
    .clk, .rst_n, .dp(dp_i), .dm(dm_i), .blank(tx_active), .line_state,
    .rx_active, .rx_valid, .rx_data, .rx_valid_h, .rx_data_h, .rx_error, .err_sync, .err_stuff, .err_align);
endmodule
