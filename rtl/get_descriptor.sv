// GET_DESCRIPTOR request handler. Claims a standard, device-to-host,
// device-recipient GET_DESCRIPTOR for the device descriptor, the
// configuration descriptor (with its interface and endpoint descriptors) or
// strings 0 and 1, and reports the descriptor's length. EP0 Base reads the
// data by byte offset (`rd_addr`); the handler turns it into a descriptor
// ROM address, so data appear one clock after the offset (ROM latency).
// Requests for other descriptors are not claimed and end in a STALL.
module get_descriptor
  import usb_pkg::*;
  import usb_desc_pkg::*;
(
  input  setup_t      setup,
  input  logic [15:0] rd_addr,
  output logic        claim,
  output logic [15:0] len,
  output logic [5:0]  rom_addr,
  input  logic [7:0]  rom_data,
  output logic [7:0]  data
);
  logic [5:0] base, dlen;
  logic       known;

  always_comb begin
    known = 1'b1;
    base  = '0;
    dlen  = '0;
    unique case (setup.wValue[15:8])
      8'd1: begin base = DEV_BASE; dlen = DEV_LEN; end
      8'd2: begin base = CFG_BASE; dlen = CFG_LEN; end
      8'd3:
        if (setup.wValue[7:0] == 8'd0)      begin base = STR0_BASE; dlen = STR0_LEN; end
        else if (setup.wValue[7:0] == 8'd1) begin base = STR1_BASE; dlen = STR1_LEN; end
        else known = 1'b0;
      default: known = 1'b0;
    endcase
    claim    = known && setup.bmRequestType == 8'h80 && setup.bRequest == REQ_GET_DESCRIPTOR;
    len      = {10'd0, dlen};
    rom_addr = base + ((rd_addr < 16'(dlen)) ? rd_addr[5:0] : 6'd0);
    data     = rom_data;
  end
endmodule
