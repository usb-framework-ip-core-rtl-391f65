// Main transaction state machine of the SIE. A token (IN, OUT, SETUP) with
// a correct CRC for this device's address selects an endpoint: the FSM
// publishes it on the token bus (`tok_valid` is the "got_token" strobe,
// `tok_ep`/`tok_pid` the "Token Info") and one clock later reads the
// endpoint's EP Status and EP Mode through the endpoint multiplexer.
//  - A token the endpoint's mode does not allow gets no reply.
//  - SETUP: clears the endpoint's STALL (`stall_clr`), accepts the DATA0
//    that follows and always answers ACK.
//  - OUT: DATA bytes are streamed to the endpoint (`rx_en`) only when it is
//    ready, not stalled and the DATA PID matches its toggle. The reply is
//    STALL, NAK, or ACK; `rx_ok` pulses when the packet was good and taken.
//    A repeated packet (wrong toggle) is ACKed and dropped.
//  - IN: STALL, NAK, or a DATA0/DATA1 packet (toggle from EP Status) of the
//    endpoint's length; then the FSM waits for the host's ACK and pulses
//    `in_ok`, which lets the endpoint advance its toggle and data.
// Waiting for data or for the ACK is bounded by the bus turn-around
// time-out. Corrupted packets get no reply. A bus reset returns to idle.
// The reply choices are those listed for the SIE; the wrong-toggle rule and
// the silent ignore for unsupported tokens follow USB 2.0.
module sie_main_fsm
  import usb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       usb_rst,
  input  logic [6:0] dev_addr,
  // unpacker
  input  logic       got_pk,
  input  logic       pk_err,
  input  logic [3:0] pk_pid,
  input  logic [6:0] pk_addr,
  input  logic [3:0] pk_ep,
  input  logic [3:0] cur_pid,
  input  logic       rx_active,
  // packer
  output logic       send,
  output logic [3:0] send_pid,
  input  logic       pk_done,
  // turn-around time-out
  output logic       to_restart,
  input  logic       timeout,
  // endpoint side
  output logic       tok_valid,
  output logic [3:0] tok_ep,
  output logic [3:0] tok_pid,
  input  ep_status_t ep_status,
  input  ep_mode_t   ep_mode,
  output logic       rx_en,
  output logic       rx_ok,
  output logic       in_ok,
  output logic       stall_clr
);
  typedef enum logic [2:0] {S_IDLE, S_DECIDE, S_WAIT_DATA, S_SEND, S_WAIT_ACK} state_t;
  state_t st;
  logic   after_send_ack;   // after S_SEND go to S_WAIT_ACK
  logic   is_dpid;

  assign is_dpid = (cur_pid == PID_DATA0) || (cur_pid == PID_DATA1);
  assign rx_en = (st == S_WAIT_DATA) && rx_active && is_dpid &&
                 ((tok_pid == PID_SETUP) ||
                  (ep_status.ready && !ep_status.stall && (cur_pid[3] == ep_status.toggle)));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; after_send_ack <= 1'b0; send <= 1'b0; send_pid <= '0;
      to_restart <= 1'b0; tok_valid <= 1'b0; tok_ep <= '0; tok_pid <= '0;
      rx_ok <= 1'b0; in_ok <= 1'b0; stall_clr <= 1'b0;
    end else begin
      send <= 1'b0; to_restart <= 1'b0; tok_valid <= 1'b0;
      rx_ok <= 1'b0; in_ok <= 1'b0; stall_clr <= 1'b0;
      if (usb_rst) st <= S_IDLE;
      else unique case (st)
        S_IDLE:
          if (got_pk && !pk_err && pk_addr == dev_addr &&
              (pk_pid == PID_IN || pk_pid == PID_OUT || pk_pid == PID_SETUP)) begin
            tok_valid <= 1'b1; tok_ep <= pk_ep; tok_pid <= pk_pid;
            st <= S_DECIDE;
          end
        S_DECIDE:
          if (tok_pid == PID_SETUP) begin
            if (ep_mode.setup_en) begin
              stall_clr <= 1'b1; to_restart <= 1'b1; st <= S_WAIT_DATA;
            end else st <= S_IDLE;
          end else if (tok_pid == PID_OUT) begin
            if (ep_mode.out_en) begin to_restart <= 1'b1; st <= S_WAIT_DATA; end
            else st <= S_IDLE;
          end else begin
            if (!ep_mode.in_en) st <= S_IDLE;
            else begin
              send <= 1'b1; st <= S_SEND;
              after_send_ack <= 1'b0;
              if (ep_status.stall)       send_pid <= PID_STALL;
              else if (!ep_status.ready) send_pid <= PID_NAK;
              else begin
                send_pid <= ep_status.toggle ? PID_DATA1 : PID_DATA0;
                after_send_ack <= 1'b1;
              end
            end
          end
        S_WAIT_DATA:
          if (got_pk) begin
            st <= S_IDLE;
            if (!pk_err && (pk_pid == PID_DATA0 || pk_pid == PID_DATA1)) begin
              after_send_ack <= 1'b0;
              if (tok_pid == PID_SETUP) begin
                send <= 1'b1; send_pid <= PID_ACK; st <= S_SEND; rx_ok <= 1'b1;
              end else if (ep_status.stall) begin
                send <= 1'b1; send_pid <= PID_STALL; st <= S_SEND;
              end else if (!ep_status.ready) begin
                send <= 1'b1; send_pid <= PID_NAK; st <= S_SEND;
              end else begin
                send <= 1'b1; send_pid <= PID_ACK; st <= S_SEND;
                rx_ok <= (pk_pid[3] == ep_status.toggle);
              end
            end
          end else if (timeout && !to_restart && !rx_active) st <= S_IDLE;
        S_SEND:
          if (pk_done) begin
            if (after_send_ack) begin st <= S_WAIT_ACK; to_restart <= 1'b1; end
            else st <= S_IDLE;
          end
        S_WAIT_ACK:
          if (got_pk) begin
            st <= S_IDLE;
            if (!pk_err && pk_pid == PID_ACK) in_ok <= 1'b1;
          end else if (timeout && !to_restart && !rx_active) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end

  // One reply per transaction: never start a packet while one is pending.
  a_one_send: assert property (@(posedge clk) disable iff (!rst_n)
    send |-> st == S_SEND);
endmodule
