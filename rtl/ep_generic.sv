// Unbuffered interrupt/bulk endpoint (EP1..EPN). The endpoint keeps the
// data toggles of its two directions and its halt (STALL) bit and connects
// the SIE straight to an application function, without a buffer:
//  - IN: the function says whether it has a packet (`fn_in_ready`) and how
//    long it is; the SIE reads its bytes by index (`fn_in_idx`), and
//    `fn_in_done` pulses when the host has acknowledged the packet.
//  - OUT: bytes of an accepted packet stream out on `fn_out_valid`;
//    `fn_out_commit` pulses when the packet was good and acknowledged,
//    `fn_out_start` when an OUT token for this endpoint arrives.
// Toggles restart at DATA0 on bus reset and on (re)configuration. The halt
// bit is set and cleared by EP0 (SET/CLEAR_FEATURE ENDPOINT_HALT) and
// cleared by a SETUP to this endpoint. The endpoint only answers tokens
// once the device is configured.
module ep_generic
  import usb_pkg::*;
#(
  parameter bit IN_EN  = 1'b1,
  parameter bit OUT_EN = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_reset,
  input  logic             configured,
  input  logic             halt_set,
  input  logic             halt_clr,
  output logic             halted,
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
  // function side
  input  logic             fn_in_ready,
  input  logic [LEN_W-1:0] fn_in_len,
  output logic [LEN_W-1:0] fn_in_idx,
  input  logic [7:0]       fn_in_data,
  output logic             fn_in_done,
  input  logic             fn_out_ready,
  output logic             fn_out_start,
  output logic             fn_out_valid,
  output logic [7:0]       fn_out_data,
  output logic             fn_out_commit
);
  logic tog_in, tog_out;
  logic is_in;

  assign is_in = (tok_pid == PID_IN);
  assign mode  = '{in_en: IN_EN && configured, out_en: OUT_EN && configured, setup_en: 1'b0};
  assign status = '{stall: halted,
                    ready: is_in ? fn_in_ready : fn_out_ready,
                    toggle: is_in ? tog_in : tog_out};
  assign tx_len        = fn_in_len;
  assign tx_data       = fn_in_data;
  assign fn_in_idx     = tx_idx;
  assign fn_in_done    = sel && is_in && in_ok;
  assign fn_out_start  = sel && tok_valid && tok_pid == PID_OUT;
  assign fn_out_valid  = sel && rx_valid && tok_pid == PID_OUT;
  assign fn_out_data   = rx_data;
  assign fn_out_commit = sel && rx_ok && tok_pid == PID_OUT;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin tog_in <= 1'b0; tog_out <= 1'b0; halted <= 1'b0; end
    else begin
      if (cfg_reset) begin tog_in <= 1'b0; tog_out <= 1'b0; halted <= 1'b0; end
      else begin
        if (fn_in_done) tog_in <= !tog_in;
        if (fn_out_commit) tog_out <= !tog_out;
        if (halt_set) halted <= 1'b1;
        if (halt_clr) begin halted <= 1'b0; tog_in <= 1'b0; tog_out <= 1'b0; end
        if (sel && stall_clr) halted <= 1'b0;
      end
    end
endmodule
