// SIE adaptation layer: the endpoint multiplexer. The SIE's received data,
// token bus and strobes are broadcast to every endpoint; this block decodes
// the endpoint number of the current token into a one-hot select and routes
// the selected endpoint's EP Status, EP Mode, packet length and transmit
// byte back to the SIE. An endpoint number with no endpoint behind it reads
// as an endpoint that supports no token, so the SIE does not answer it.
// Purely combinational. Holding only multiplexers (no registers, no
// buffers) is the layer's defining simplification.
module ep_mux
  import usb_pkg::*;
#(
  parameter int unsigned NUM_EP = 2
) (
  input  logic [3:0]       tok_ep,
  output logic [NUM_EP-1:0] ep_sel,
  input  ep_status_t       ep_status_i [NUM_EP],
  input  ep_mode_t         ep_mode_i   [NUM_EP],
  input  logic [LEN_W-1:0] ep_len_i    [NUM_EP],
  input  logic [7:0]       ep_data_i   [NUM_EP],
  output ep_status_t       ep_status,
  output ep_mode_t         ep_mode,
  output logic [LEN_W-1:0] ep_len,
  output logic [7:0]       ep_data
);
  always_comb begin
    ep_sel    = '0;
    ep_status = '0;
    ep_mode   = '0;
    ep_len    = '0;
    ep_data   = '0;
    for (int i = 0; i < NUM_EP; i++)
      if (tok_ep == 4'(i)) begin
        ep_sel[i] = 1'b1;
        ep_status = ep_status_i[i];
        ep_mode   = ep_mode_i[i];
        ep_len    = ep_len_i[i];
        ep_data   = ep_data_i[i];
      end
  end
endmodule
