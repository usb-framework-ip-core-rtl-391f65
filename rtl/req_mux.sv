// Request multiplexer between EP0 Base and the request handlers. Every
// handler sees the current SETUP packet and the read offset; the first one
// (lowest index) that claims the request is selected, and its length and
// data are routed to EP0 Base. `sel` tells each handler whether it owns the
// current request, so side effects of `done` only reach that handler.
// Combinational. The priority order is this design's choice.
module req_mux #(
  parameter int unsigned N = 1
) (
  input  logic [N-1:0] claim_i,
  input  logic [15:0]  len_i  [N],
  input  logic [7:0]   data_i [N],
  output logic [N-1:0] sel,
  output logic         claim,
  output logic [15:0]  len,
  output logic [7:0]   data
);
  always_comb begin
    sel = '0; claim = 1'b0; len = '0; data = '0;
    for (int i = N - 1; i >= 0; i--)
      if (claim_i[i]) begin
        sel = '0; sel[i] = 1'b1;
        claim = 1'b1; len = len_i[i]; data = data_i[i];
      end
  end
endmodule
