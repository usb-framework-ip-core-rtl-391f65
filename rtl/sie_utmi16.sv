// Width adapter between the SIE's byte-wide packer/unpacker and a PHY used
// in its 16-bit UTMI mode. With it the SIE's data buses toward the PHY can
// be 8 or 16 bits wide, as the SIE is meant to be configurable, while the
// packet logic inside stays byte oriented.
// Receive: a word from the PHY (RxValid, plus RxValidH when RxDataH holds a
// byte) is replayed as the low byte in the same cycle and the high byte in
// the next one. The PHY delivers a word at most every 64 clocks, so the two
// never overlap.
// Transmit: the adapter takes bytes from the packer, at most one every
// GAP clocks, because the packer's data come from an endpoint that may need
// a clock or two after the byte index changes. Two bytes make a word,
// offered to the PHY with TxValid and TxValidH. When the packer drops its
// TxValid with one byte gathered, that byte goes out alone (TxValidH low)
// as the packet's last word. TxValid toward the PHY is low while a word is
// being gathered; the PHY looks at its input register only at byte
// boundaries, 32 clocks apart, so the gaps never reach the line.
// The byte order (low byte first) is UTMI's; the pacing and gathering are
// this design's choices. The SIE runs on the PHY clock; the half-rate SIE
// clock of the original core is not offered.
module sie_utmi16 #(
  parameter int unsigned GAP = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // PHY side, 16-bit UTMI
  input  logic       ph_rx_valid,
  input  logic       ph_rx_valid_h,
  input  logic [7:0] ph_rx_data,
  input  logic [7:0] ph_rx_data_h,
  output logic       ph_tx_valid,
  output logic       ph_tx_valid_h,
  output logic [7:0] ph_tx_data,
  output logic [7:0] ph_tx_data_h,
  input  logic       ph_tx_ready,
  // SIE side, byte stream
  output logic       b_rx_valid,
  output logic [7:0] b_rx_data,
  input  logic       b_tx_valid,
  input  logic [7:0] b_tx_data,
  output logic       b_tx_ready
);
  // receive: replay the high byte one clock after the low one
  logic       hi_pend;
  logic [7:0] hi_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin hi_pend <= 1'b0; hi_q <= '0; end
    else begin
      hi_pend <= ph_rx_valid && ph_rx_valid_h;
      if (ph_rx_valid) hi_q <= ph_rx_data_h;
    end

  assign b_rx_valid = ph_rx_valid || hi_pend;
  assign b_rx_data  = ph_rx_valid ? ph_rx_data : hi_q;

  // transmit: gather two bytes, paced by GAP
  logic [1:0] cnt;                 // bytes gathered
  logic       full;                // word complete or packet ended
  logic [7:0] lo_q, hi_t;
  logic [$clog2(GAP+1)-1:0] wait_cnt;

  assign b_tx_ready    = b_tx_valid && !full && (cnt != 2'd2) && (wait_cnt == '0);
  assign ph_tx_valid   = full;
  assign ph_tx_valid_h = full && (cnt == 2'd2);
  assign ph_tx_data    = lo_q;
  assign ph_tx_data_h  = hi_t;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt <= '0; full <= 1'b0; lo_q <= '0; hi_t <= '0; wait_cnt <= '0;
    end else begin
      if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
      if (full) begin
        if (ph_tx_ready) begin full <= 1'b0; cnt <= '0; end
      end else if (b_tx_ready) begin
        if (cnt == 2'd0) lo_q <= b_tx_data; else hi_t <= b_tx_data;
        cnt      <= cnt + 2'd1;
        full     <= (cnt == 2'd1);
        wait_cnt <= ($clog2(GAP+1))'(GAP - 1);
      end else if (cnt == 2'd1 && !b_tx_valid) begin
        full <= 1'b1;                // odd last byte
      end
    end

  // a word is offered only when complete, and held until the PHY takes it
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ph_tx_valid && !ph_tx_ready |=> ph_tx_valid && $stable(ph_tx_data) && $stable(ph_tx_valid_h));
endmodule
