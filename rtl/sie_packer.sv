// SIE packer: assembles the packets the device sends. A `send` pulse with a
// PID starts a packet. Handshakes (ACK, NAK, STALL, NYET) are the PID byte
// alone. DATA0/DATA1 are the PID, `tx_len` payload bytes read from the
// endpoint by index (`tx_idx`, the "Count total/curr" bus) and the CRC16,
// low byte first; a zero length gives the CRC of nothing (0000). Bytes go
// to the PHY over the UTMI TxValid/TxReady handshake, one per clock edge
// where both are high. The endpoint must present the byte for `tx_idx`
// within a few clocks of the index changing (a byte takes 32 clocks on the
// line). `done` pulses when the last byte has been handed to the PHY;
// `busy` is high from `send` until then.
// It hands over one byte at a time; with the 16-bit UTMI bus, sie_utmi16
// gathers the bytes into words for the PHY.
module sie_packer
  import usb_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             send,
  input  logic [3:0]       pid,
  input  logic [LEN_W-1:0] tx_len,
  input  logic [7:0]       ep_data,
  output logic [LEN_W-1:0] tx_idx,
  output logic             tx_valid,
  output logic [7:0]       tx_data,
  input  logic             tx_ready,
  output logic             busy,
  output logic             done
);
  typedef enum logic [2:0] {S_IDLE, S_PID, S_DATA, S_CRCL, S_CRCH} state_t;
  state_t     st;
  logic [3:0] pid_q;
  logic [15:0] crc;
  logic       crc_unused;
  logic       is_data;

  assign is_data = (pid_q == PID_DATA0) || (pid_q == PID_DATA1);

  usb_crc16 u_crc16 (.clk, .rst_n, .clr(send), .en(st == S_DATA && tx_ready),
    .data(ep_data), .crc, .ok(crc_unused));

  always_comb begin
    unique case (st)
      S_PID:   tx_data = {~pid_q, pid_q};
      S_DATA:  tx_data = ep_data;
      S_CRCL:  tx_data = crc[7:0];
      S_CRCH:  tx_data = crc[15:8];
      default: tx_data = 8'h00;
    endcase
  end
  assign tx_valid = (st != S_IDLE);
  assign busy     = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; pid_q <= '0; tx_idx <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (send) begin st <= S_PID; pid_q <= pid; tx_idx <= '0; end
        S_PID:
          if (tx_ready) begin
            if (!is_data) begin st <= S_IDLE; done <= 1'b1; end
            else st <= (tx_len == 0) ? S_CRCL : S_DATA;
          end
        S_DATA:
          if (tx_ready) begin
            tx_idx <= tx_idx + 1'b1;
            if (tx_idx + 1'b1 == tx_len) st <= S_CRCL;
          end
        S_CRCL: if (tx_ready) st <= S_CRCH;
        S_CRCH: if (tx_ready) begin st <= S_IDLE; done <= 1'b1; end
        default: st <= S_IDLE;
      endcase
    end
endmodule
