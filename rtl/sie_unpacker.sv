// SIE unpacker: disassembles the packets delivered by the PHY's UTMI receive
// interface. The first byte is the PID, checked against its complement.
// IN, OUT and SETUP tokens carry 7 address bits, 4 endpoint bits and a CRC5;
// DATA0/DATA1 carry payload bytes and a CRC16; ACK, NAK and STALL are one
// byte. Every other PID (SOF, PING, ...) is discarded. Payload bytes are
// passed on with `d_valid` two bytes late, so the two trailing CRC bytes are
// never delivered. When RxActive falls, `got_pk` pulses for one clock with
// the PID, address and endpoint, and `pk_err` set for an incomplete packet,
// a CRC mismatch, a bad PID or a PHY error (also reported one by one).
// `cur_pid` is valid from the first byte on, so the consumer can decide
// about a data packet before it ends. The packet classes and checks follow
// the SIE description; the two-byte delay is this design's choice.
// It takes one byte per RxValid; when the SIE uses the 16-bit UTMI bus,
// sie_utmi16 in front of it splits each word into two bytes.
module sie_unpacker
  import usb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_active,
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  input  logic       rx_error,
  output logic [3:0] cur_pid,
  output logic       got_pk,
  output logic       pk_err,
  output logic [3:0] pk_pid,
  output logic [6:0] pk_addr,
  output logic [3:0] pk_ep,
  output logic       d_valid,
  output logic [7:0] d_data,
  output logic       err_crc,
  output logic       err_pid,
  output logic       err_incomplete
);
  logic       act_q, phy_err, pid_ok;
  logic [6:0] cnt;
  logic [7:0] f1, f2, dly1, dly2;
  logic       crc5_ok, crc16_ok;
  logic [4:0] crc5_unused;
  logic [15:0] crc16_unused;
  logic       is_tok, is_dat, is_hs, known;

  assign is_tok = (cur_pid == PID_OUT) || (cur_pid == PID_IN) || (cur_pid == PID_SETUP);
  assign is_dat = (cur_pid == PID_DATA0) || (cur_pid == PID_DATA1);
  assign is_hs  = (cur_pid == PID_ACK) || (cur_pid == PID_NAK) || (cur_pid == PID_STALL);
  assign known  = is_tok || is_dat || is_hs;

  usb_crc5 u_crc5 (.data({f2[2:0], f1}), .crc_rx(f2[7:3]), .crc(crc5_unused), .ok(crc5_ok));

  usb_crc16 u_crc16 (.clk, .rst_n, .clr(rx_active && !act_q), .en(rx_valid && cnt != 0),
    .data(rx_data), .crc(crc16_unused), .ok(crc16_ok));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      act_q <= 1'b0; phy_err <= 1'b0; pid_ok <= 1'b0; cnt <= '0; cur_pid <= '0;
      f1 <= '0; f2 <= '0; dly1 <= '0; dly2 <= '0;
      got_pk <= 1'b0; pk_err <= 1'b0; pk_pid <= '0; pk_addr <= '0; pk_ep <= '0;
      d_valid <= 1'b0; d_data <= '0; err_crc <= 1'b0; err_pid <= 1'b0; err_incomplete <= 1'b0;
    end else begin
      act_q <= rx_active;
      got_pk <= 1'b0; d_valid <= 1'b0;
      err_crc <= 1'b0; err_pid <= 1'b0; err_incomplete <= 1'b0;
      if (rx_active && !act_q) begin
        cnt <= '0; phy_err <= 1'b0; pid_ok <= 1'b0;
      end
      if (rx_error) phy_err <= 1'b1;
      if (rx_valid) begin
        if (cnt != 7'h7f) cnt <= cnt + 7'd1;
        if (cnt == 0) begin
          cur_pid <= rx_data[3:0];
          pid_ok  <= (rx_data[3:0] == ~rx_data[7:4]);
        end else begin
          if (cnt == 1) f1 <= rx_data;   // token fields
          if (cnt == 2) f2 <= rx_data;
          dly1 <= rx_data; dly2 <= dly1;
          if (is_dat && cnt >= 3) begin d_valid <= 1'b1; d_data <= dly2; end
        end
      end
      if (act_q && !rx_active && known) begin
        logic inc, crc_bad, perr;
        perr    = !pid_ok;
        inc     = phy_err || rx_error || (is_tok && cnt != 3) || (is_hs && cnt != 1) || (is_dat && cnt < 3);
        crc_bad = !inc && ((is_tok && !crc5_ok) || (is_dat && !crc16_ok));
        got_pk  <= 1'b1;
        pk_err  <= inc || crc_bad || perr;
        err_incomplete <= inc;
        err_crc <= crc_bad;
        err_pid <= perr;
        pk_pid  <= cur_pid;
        pk_addr <= f1[6:0];
        pk_ep   <= {f2[2:0], f1[7]};
      end
    end
endmodule
