// Byte-wide USB data CRC16 (x^16 + x^15 + x^2 + 1, seed FFFF, data LSB first).
// The register is cleared with `clr` and updated with `data` on each `en`.
// `crc` is the inverted value the transmitter sends (low byte first); `ok`
// is high when the bytes fed so far, including a received CRC, leave the USB
// residual (0x800D, 0xB001 in this bit-reversed register). One cycle per byte.
module usb_crc16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [15:0] crc,
  output logic        ok
);
  logic [15:0] r, nxt;

  always_comb begin
    nxt = r ^ {8'h00, data};
    for (int i = 0; i < 8; i++)
      nxt = nxt[0] ? ((nxt >> 1) ^ 16'hA001) : (nxt >> 1);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   r <= 16'hFFFF;
    else if (clr) r <= 16'hFFFF;
    else if (en)  r <= nxt;

  assign crc = ~r;
  assign ok  = (r == 16'hB001);
endmodule
