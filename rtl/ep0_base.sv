// EP0 Base: the control endpoint with the most common standard requests.
// The eight SETUP bytes are collected while they arrive and committed when
// the SIE acknowledges the packet. A committed request is decoded once:
//  - SET_ADDRESS: status stage, the new address takes effect after it.
//  - SET_CONFIGURATION (0 or 1), GET_CONFIGURATION.
//  - GET_STATUS for device, interface or endpoint (endpoint halt bit).
//  - CLEAR_FEATURE / SET_FEATURE: ENDPOINT_HALT on endpoints 1..NUM_EP-1,
//    device features are accepted and ignored.
//  - anything else is offered to the request handlers through the request
//    mux; a device-to-host request one of them claims gets a data stage
//    from the handler's data, a no-data request just a status stage.
//  - unclaimed requests, and host-to-device requests with a data stage,
//    are answered with STALL until the next SETUP.
// The IN data stage sends min(wLength, length) bytes in packets of MPS
// bytes, starting with DATA1 and alternating, and ends with a short packet
// (a zero-length one if needed). The status stage is a zero-length DATA1
// in the opposite direction. The endpoint is unbuffered: the SIE reads each
// byte by index, one clock after the index changes at most.
// The split between a base with the common requests and pluggable
// handlers follows the modular endpoint/request architecture; the exact
// request set and the STALL policy are this design's choices.
module ep0_base
  import usb_pkg::*;
#(
  parameter int unsigned MPS    = 8,
  parameter int unsigned NUM_EP = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             usb_rst,
  // SIE side (through the endpoint mux)
  input  logic             sel,
  input  logic             tok_valid,
  input  logic [3:0]       tok_pid,
  input  logic             rx_valid,
  input  logic [7:0]       rx_data,
  input  logic             rx_ok,
  input  logic             in_ok,
  input  logic             stall_clr,
  input  logic [LEN_W-1:0] tx_idx,
  output ep_status_t       status,
  output ep_mode_t         mode,
  output logic [LEN_W-1:0] tx_len,
  output logic [7:0]       tx_data,
  // device state
  output logic [6:0]       dev_addr,
  output logic             configured,
  output logic             cfg_reset,
  output logic [NUM_EP-1:0] halt_set,
  output logic [NUM_EP-1:0] halt_clr,
  input  logic [NUM_EP-1:0] halted,
  // request handlers (through the request mux)
  output setup_t           setup,
  output logic [15:0]      rd_addr,
  input  logic             h_claim,
  input  logic [15:0]      h_len,
  input  logic [7:0]       h_data,
  output logic             h_done
);
  // index width for the per-endpoint halt vectors
  localparam int EPW = (NUM_EP > 1) ? $clog2(NUM_EP) : 1;
  typedef enum logic [2:0] {S_IDLE, S_DECODE, S_DATA_IN, S_STATUS_OUT, S_STATUS_IN, S_STALL} state_t;
  typedef enum logic [1:0] {SRC_HANDLER, SRC_CONFIG, SRC_STATUS} src_t;

  state_t      st;
  src_t        src;
  logic [7:0]  stage [8];
  logic [3:0]  scnt;
  logic [15:0] total, offset, remain;
  logic [LEN_W-1:0] pkt_len;
  logic        tog_in, set_addr_pending, status_bit, is_setup;
  logic [6:0]  new_addr;

  assign is_setup = (tok_pid == PID_SETUP);
  assign remain   = total - offset;
  assign pkt_len  = (remain > 16'(MPS)) ? LEN_W'(MPS) : LEN_W'(remain);
  assign rd_addr  = offset + 16'(tx_idx);
  assign mode     = '{in_en: 1'b1, out_en: 1'b1, setup_en: 1'b1};
  assign tx_len   = (st == S_DATA_IN) ? pkt_len : '0;

  always_comb begin
    status = '0;
    if (st == S_STALL) status.stall = 1'b1;
    else if (tok_pid == PID_IN) begin
      status.ready  = (st == S_DATA_IN) || (st == S_STATUS_IN);
      status.toggle = (st == S_DATA_IN) ? tog_in : 1'b1;
    end else begin
      status.ready  = (st == S_DATA_IN) || (st == S_STATUS_OUT);
      status.toggle = 1'b1;
    end
    unique case (src)
      SRC_CONFIG: tx_data = {7'd0, configured};
      SRC_STATUS: tx_data = (tx_idx == 0) ? {7'd0, status_bit} : 8'h00;
      default:    tx_data = h_data;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; src <= SRC_HANDLER; scnt <= '0; setup <= '0;
      total <= '0; offset <= '0; tog_in <= 1'b0; set_addr_pending <= 1'b0;
      status_bit <= 1'b0; new_addr <= '0; dev_addr <= '0; configured <= 1'b0;
      cfg_reset <= 1'b0; halt_set <= '0; halt_clr <= '0; h_done <= 1'b0;
      for (int i = 0; i < 8; i++) stage[i] <= '0;
    end else begin
      cfg_reset <= 1'b0; halt_set <= '0; halt_clr <= '0; h_done <= 1'b0;
      if (usb_rst) begin
        st <= S_IDLE; dev_addr <= '0; configured <= 1'b0; set_addr_pending <= 1'b0;
        cfg_reset <= 1'b1;
      end else begin
        // SETUP collection
        if (sel && tok_valid && is_setup) scnt <= '0;
        if (sel && is_setup && rx_valid && scnt < 4'd8) begin
          stage[scnt[2:0]] <= rx_data; scnt <= scnt + 4'd1;
        end
        if (sel && is_setup && rx_ok) begin
          if (scnt == 4'd8) begin
            setup <= '{wLength: {stage[7], stage[6]}, wIndex: {stage[5], stage[4]},
                       wValue: {stage[3], stage[2]}, bRequest: stage[1], bmRequestType: stage[0]};
            st <= S_DECODE;
          end else st <= S_STALL;
        end else if (sel && stall_clr && st == S_STALL) st <= S_IDLE;
        else unique case (st)
          S_DECODE: begin
            logic [3:0] ep;
            ep = setup.wIndex[3:0];
            offset <= '0; tog_in <= 1'b1; src <= SRC_HANDLER;
            st <= S_STALL;
            unique casez ({setup.bmRequestType, setup.bRequest})
              {8'h00, REQ_SET_ADDRESS}: begin
                new_addr <= setup.wValue[6:0]; set_addr_pending <= 1'b1; st <= S_STATUS_IN;
              end
              {8'h00, REQ_SET_CONFIGURATION}:
                if (setup.wValue <= 16'd1) begin
                  configured <= setup.wValue[0]; cfg_reset <= 1'b1; st <= S_STATUS_IN;
                end
              {8'h80, REQ_GET_CONFIGURATION}: begin
                src <= SRC_CONFIG; total <= (setup.wLength < 16'd1) ? setup.wLength : 16'd1;
                st <= S_DATA_IN;
              end
              {8'b1000_00??, REQ_GET_STATUS}: begin
                src <= SRC_STATUS; total <= (setup.wLength < 16'd2) ? setup.wLength : 16'd2;
                status_bit <= (setup.bmRequestType[1:0] == 2'd2) && (32'(ep) < NUM_EP) && halted[ep[EPW-1:0]];
                st <= S_DATA_IN;
              end
              {8'h00, REQ_CLEAR_FEATURE}, {8'h00, REQ_SET_FEATURE}: st <= S_STATUS_IN;
              {8'h02, REQ_CLEAR_FEATURE}, {8'h02, REQ_SET_FEATURE}:
                if (setup.wValue == 16'd0 && ep != 4'd0 && 32'(ep) < NUM_EP) begin
                  if (setup.bRequest == REQ_SET_FEATURE) halt_set[ep[EPW-1:0]] <= 1'b1;
                  else                                   halt_clr[ep[EPW-1:0]] <= 1'b1;
                  st <= S_STATUS_IN;
                end
              default:
                if (h_claim) begin
                  if (setup.bmRequestType[7]) begin
                    total <= (setup.wLength < h_len) ? setup.wLength : h_len;
                    st <= S_DATA_IN;
                  end else if (setup.wLength == 16'd0) st <= S_STATUS_IN;
                end
            endcase
          end
          S_DATA_IN:
            if (sel && in_ok) begin
              offset <= offset + 16'(pkt_len);
              tog_in <= !tog_in;
              if (pkt_len != LEN_W'(MPS) || offset + 16'(pkt_len) == setup.wLength)
                st <= S_STATUS_OUT;
            end else if (sel && rx_ok && tok_pid == PID_OUT) begin
              st <= S_IDLE; h_done <= 1'b1;       // host ended the data stage early
            end
          S_STATUS_OUT:
            if (sel && rx_ok && tok_pid == PID_OUT) begin st <= S_IDLE; h_done <= 1'b1; end
          S_STATUS_IN:
            if (sel && in_ok) begin
              st <= S_IDLE; h_done <= 1'b1;
              if (set_addr_pending) begin dev_addr <= new_addr; set_addr_pending <= 1'b0; end
            end
          default: ;
        endcase
      end
    end
endmodule
