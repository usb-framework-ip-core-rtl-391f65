// UTMI transmit section of the full/low-speed PHY.
// The SIE raises TxValid with the first byte (the PID); a byte moves into
// the one-byte input register on each clock edge where TxValid and TxReady
// are both high. The Tx FSM drives /OE low, sends SYNC (00000001, LSB first)
// and then the bytes LSB first, one bit every four clocks. The bit stuffer
// inserts a 0 after six consecutive 1s (counted from the SYNC on), the NRZI
// encoder toggles the line level for each 0, and the differential encoder
// maps the level to D+/D- (J = D+ high at full speed, D- high at low speed).
// When the input register is empty at a byte boundary and TxValid is low,
// the FSM sends EOP: two bit times of SE0 and one of J, then releases /OE.
// The structure follows the PHY block diagram (Input Register, Tx FSM,
// BitStuffer, NRZI Encoder, Differential Encoder); the handshake is the
// UTMI one and the EOP shape the USB 2.0 one.
// With DATA16 set the input register holds two bytes, as in the UTMI 16-bit
// mode: a word is taken when TxValid and TxReady are high, TxData goes out
// first and TxDataH after it if TxValidH is high (so a packet with an odd
// number of bytes ends with a word whose TxValidH is low). TxReady then
// comes about every 64 clocks. With DATA16 clear TxValidH is ignored. How
// the two bytes are queued is this design's choice.
module phy_tx #(
  parameter bit LOW_SPEED = 1'b0,
  parameter bit DATA16    = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  input  logic       tx_valid_h,  // 16-bit mode: TxDataH is a byte to send
  input  logic [7:0] tx_data_h,
  output logic       tx_ready,
  output logic       dp,
  output logic       dm,
  output logic       oe_n,
  output logic       tx_active    // transmitter owns the line
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_EOP} state_t;

  state_t     st;
  logic [1:0] tick_cnt;
  logic       tick;
  logic [15:0] hold;
  logic [7:0]  sh;
  logic [1:0]  hold_cnt;          // bytes waiting in the input register
  logic        hold_full;
  logic [3:0] bits_left;
  logic [2:0] ones;
  logic [1:0] eop_cnt;
  logic       lvl, se0_o;

  assign hold_full = (hold_cnt != 2'd0);
  assign tick      = (tick_cnt == 2'd3);
  assign tx_ready  = tx_valid && !hold_full && (st != S_EOP);
  assign tx_active = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; tick_cnt <= '0; hold <= '0; hold_cnt <= '0; sh <= '0;
      bits_left <= '0; ones <= '0; eop_cnt <= '0; lvl <= 1'b1; se0_o <= 1'b0;
      oe_n <= 1'b1;
    end else begin
      if (tx_valid && tx_ready) begin
        hold     <= {tx_data_h, tx_data};
        hold_cnt <= (DATA16 && tx_valid_h) ? 2'd2 : 2'd1;
      end
      tick_cnt <= (st == S_IDLE) ? 2'd0 : tick_cnt + 2'd1;
      unique case (st)
        S_IDLE:
          if (tx_valid) begin
            st <= S_SEND; oe_n <= 1'b0; lvl <= 1'b1; se0_o <= 1'b0;
            sh <= 8'h80; bits_left <= 4'd8; ones <= '0;
          end
        S_SEND:
          if (tick) begin
            if (ones == 3'd6) begin          // stuffed 0
              lvl <= ~lvl; ones <= '0;
            end else if (bits_left != 4'd0) begin
              if (!sh[0]) lvl <= ~lvl;
              ones <= sh[0] ? ones + 3'd1 : 3'd0;
              sh <= sh >> 1; bits_left <= bits_left - 4'd1;
            end else if (hold_full) begin    // next byte from input register
              if (!hold[0]) lvl <= ~lvl;
              ones <= hold[0] ? ones + 3'd1 : 3'd0;
              sh <= hold[7:0] >> 1; bits_left <= 4'd7;
              hold <= hold >> 8; hold_cnt <= hold_cnt - 2'd1;
            end else begin                   // end of packet
              st <= S_EOP; se0_o <= 1'b1; eop_cnt <= '0;
            end
          end
        S_EOP:
          if (tick) begin
            eop_cnt <= eop_cnt + 2'd1;
            if (eop_cnt == 2'd1) begin se0_o <= 1'b0; lvl <= 1'b1; end
            if (eop_cnt == 2'd2) begin st <= S_IDLE; oe_n <= 1'b1; end
          end
        default: st <= S_IDLE;
      endcase
    end

  assign dp = !se0_o && (LOW_SPEED ? !lvl : lvl);
  assign dm = !se0_o && (LOW_SPEED ? lvl : !lvl);
endmodule
