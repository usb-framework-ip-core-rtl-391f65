// Token CRC5 checker. Computes the USB CRC5 (x^5 + x^2 + 1, seed 11111,
// data LSB first, result inverted) over the 11-bit address/endpoint field of a
// token and compares it with the 5-bit field received after it. Purely
// combinational; the unpacker samples `ok` when the token is complete.
// Polynomial and bit order are the USB 2.0 ones.
module usb_crc5 (
  input  logic [10:0] data,    // {endp[3:0], addr[6:0]}, bit 0 sent first
  input  logic [4:0]  crc_rx,  // received CRC field, bit 0 sent first
  output logic [4:0]  crc,     // CRC to send for `data`
  output logic        ok       // crc_rx matches
);
  always_comb begin
    logic [4:0] c;
    c = 5'h1f;
    for (int i = 0; i < 11; i++) begin
      if (c[0] ^ data[i]) c = (c >> 1) ^ 5'h14;
      else                c = c >> 1;
    end
    crc = ~c;
    ok  = (crc == crc_rx);
  end
endmodule
