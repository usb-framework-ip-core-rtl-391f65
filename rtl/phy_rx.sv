// UTMI receive section of the full/low-speed PHY.
// The line is sampled four times per bit (48 MHz for FS, 6 MHz for LS). A
// DPLL made of a 2-bit phase counter restarts on every transition of D+/D-
// and takes a bit sample two clocks after it, in the middle of the bit. The
// differential decoder turns the sampled pair into a data level (1 = J) and
// an SE0 flag; the NRZI decoder outputs 1 for "no change" and 0 for a
// transition. The Rx FSM waits for a SYNC (at least four 0s and then a 1),
// raises RxActive, removes stuffed bits (a 0 after six 1s; a seventh 1 is a
// stuffing error), assembles bytes LSB first and pulses RxValid with RxData
// once per byte. SE0 followed by J ends the packet (EOP detector); an EOP
// that is not on a byte boundary is an alignment error. Any error pulses
// RxError for one clock as RxActive falls. An edge that arrives half a bit
// away from where the DPLL expects it flags err_sync.
// The decomposition follows the receive chain of the PHY block diagram; the
// SYNC acceptance rule, the error definitions and the 2-clock sample point
// are this design's choices. RxData is valid in the cycle RxValid is high,
// about 32 clocks apart at full speed.
// With DATA16 set the output register is 16 bits wide, as in the UTMI
// 16-bit mode: the first byte of each pair is held, and when the second
// one completes RxValid and RxValidH pulse together with the first byte on
// RxData and the second on RxDataH (about every 64 clocks). A packet with an
// odd number of bytes ends with RxValid alone, given when the EOP's SE0 is
// seen while RxActive is still high. With DATA16 clear RxValidH stays low
// and RxDataH is zero. The pairing and the timing of the last odd byte are
// this design's choices.
module phy_rx #(
  parameter bit LOW_SPEED = 1'b0,
  parameter bit DATA16    = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dp,          // D+ (asynchronous)
  input  logic       dm,          // D- (asynchronous)
  input  logic       blank,       // transmitter owns the line
  output logic [1:0] line_state,  // {D-, D+} synchronised
  output logic       rx_active,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_valid_h,  // 16-bit mode: RxDataH valid too
  output logic [7:0] rx_data_h,
  output logic       rx_error,
  output logic       err_sync,
  output logic       err_stuff,
  output logic       err_align
);
  typedef enum logic [1:0] {S_IDLE, S_SYNC, S_DATA, S_EOP} state_t;

  logic [1:0] dp_s, dm_s;
  logic [1:0] line, line_q;
  logic [1:0] phase;
  logic       bit_en;
  logic       se0, lvl, last_lvl, nrzi_bit;
  state_t     st;
  logic [2:0] zcnt, ones;
  logic [2:0] bcnt;
  logic [6:0] sh;
  logic       align_bad, abort;
  logic       have_lo;            // 16-bit mode: first byte of a pair held

  // Input synchroniser.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin dp_s <= 2'b11; dm_s <= 2'b00; end
    else begin dp_s <= {dp_s[0], dp}; dm_s <= {dm_s[0], dm}; end

  assign line       = {dm_s[1], dp_s[1]};
  assign line_state = line;

  // DPLL: restart the phase on every transition, sample at phase 1.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin line_q <= 2'b01; phase <= '0; end
    else begin
      line_q <= line;
      phase  <= (line != line_q) ? 2'd0 : phase + 2'd1;
    end
  assign bit_en   = (phase == 2'd1) && (line == line_q);
  assign err_sync = rx_active && (line != line_q) && (phase == 2'd1);

  // Differential and NRZI decoders.
  assign se0      = (line == 2'b00);
  assign lvl      = LOW_SPEED ? line[1] : line[0];
  assign nrzi_bit = (lvl == last_lvl);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) last_lvl <= 1'b1;
    else if (blank) last_lvl <= 1'b1;
    else if (bit_en) last_lvl <= se0 ? 1'b1 : lvl;

  // Rx FSM, unstuffer and output register.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; zcnt <= '0; ones <= '0; bcnt <= '0; sh <= '0;
      rx_active <= 1'b0; rx_valid <= 1'b0; rx_data <= '0; rx_error <= 1'b0;
      err_stuff <= 1'b0; err_align <= 1'b0; align_bad <= 1'b0; abort <= 1'b0;
      rx_valid_h <= 1'b0; rx_data_h <= '0; have_lo <= 1'b0;
    end else begin
      rx_valid  <= 1'b0;
      rx_valid_h <= 1'b0;
      rx_error  <= 1'b0;
      err_stuff <= 1'b0;
      err_align <= 1'b0;
      if (blank) begin
        st <= S_IDLE; rx_active <= 1'b0; have_lo <= 1'b0;
      end else if (bit_en) begin
        unique case (st)
          S_IDLE:
            if (!se0 && !nrzi_bit) begin st <= S_SYNC; zcnt <= 3'd1; end
          S_SYNC:
            if (se0) st <= S_IDLE;
            else if (!nrzi_bit) begin
              if (zcnt != 3'd7) zcnt <= zcnt + 3'd1;
            end else if (zcnt >= 3'd4) begin
              st <= S_DATA; rx_active <= 1'b1;
              ones <= 3'd1; bcnt <= '0; align_bad <= 1'b0; abort <= 1'b0;
              have_lo <= 1'b0;
            end else st <= S_IDLE;
          S_DATA:
            if (se0) begin
              st <= S_EOP;
              align_bad <= (bcnt != 3'd0);
              // odd last byte of a 16-bit mode packet
              if (have_lo && bcnt == 3'd0 && !abort) rx_valid <= 1'b1;
              have_lo <= 1'b0;
            end else if (abort) begin
              ones <= '0;             // wait for the EOP after an error
            end else if (ones == 3'd6) begin
              ones <= '0;
              if (nrzi_bit) begin     // seventh 1: stuffing error
                abort <= 1'b1; rx_active <= 1'b0; have_lo <= 1'b0;
                rx_error <= 1'b1; err_stuff <= 1'b1;
              end
            end else begin
              ones <= nrzi_bit ? ones + 3'd1 : 3'd0;
              sh   <= {nrzi_bit, sh[6:1]};
              bcnt <= bcnt + 3'd1;
              if (bcnt == 3'd7) begin
                if (DATA16 && !have_lo) begin
                  rx_data <= {nrzi_bit, sh};
                  have_lo <= 1'b1;
                end else begin
                  if (DATA16) begin
                    rx_data_h  <= {nrzi_bit, sh};
                    rx_valid_h <= 1'b1;
                  end else rx_data <= {nrzi_bit, sh};
                  rx_valid <= 1'b1;
                  have_lo  <= 1'b0;
                end
              end
            end
          S_EOP:
            if (!se0) begin           // SE0 then J: EOP detected
              st <= S_IDLE;
              if (rx_active && align_bad) begin rx_error <= 1'b1; err_align <= 1'b1; end
              rx_active <= 1'b0;
            end
          default: st <= S_IDLE;
        endcase
      end
    end
endmodule
