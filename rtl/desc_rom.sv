// Descriptor ROM: 64 bytes with one clock of read latency (maps to a block
// RAM or LUTs). Holds the descriptors of the demonstration device: a
// USB 2.0 full-speed device with 8-byte control packets, vendor ID 0x1209,
// product ID 0x0001, one configuration (bus powered, 100 mA) with one
// vendor-specific interface and two interrupt endpoints, EP1 IN and EP1 OUT,
// 8 bytes every 10 ms; string 0 lists US English and string 1 reads "GPIO".
// The addresses are in usb_desc_pkg. The contents are this design's.
module desc_rom
  import usb_desc_pkg::*;
(
  input  logic       clk,
  input  logic [5:0] addr,
  output logic [7:0] data
);
  typedef logic [7:0] rom_t [ROM_SIZE];

  function automatic rom_t contents();
    rom_t r = '{default: 8'h00};
    // device descriptor
    r[0] = 8'h12; r[1] = 8'h01; r[2] = 8'h00; r[3] = 8'h02; r[4] = 8'h00; r[5] = 8'h00;
    r[6] = 8'h00; r[7] = 8'h08; r[8] = 8'h09; r[9] = 8'h12; r[10] = 8'h01; r[11] = 8'h00;
    r[12] = 8'h00; r[13] = 8'h01; r[14] = 8'h00; r[15] = 8'h01; r[16] = 8'h00; r[17] = 8'h01;
    // configuration descriptor
    r[18] = 8'h09; r[19] = 8'h02; r[20] = 8'h20; r[21] = 8'h00; r[22] = 8'h01; r[23] = 8'h01;
    r[24] = 8'h00; r[25] = 8'h80; r[26] = 8'h32;
    // interface descriptor
    r[27] = 8'h09; r[28] = 8'h04; r[29] = 8'h00; r[30] = 8'h00; r[31] = 8'h02; r[32] = 8'hFF;
    r[33] = 8'h00; r[34] = 8'h00; r[35] = 8'h00;
    // endpoint 1 IN, interrupt
    r[36] = 8'h07; r[37] = 8'h05; r[38] = 8'h81; r[39] = 8'h03; r[40] = 8'h08; r[41] = 8'h00;
    r[42] = 8'h0A;
    // endpoint 1 OUT, interrupt
    r[43] = 8'h07; r[44] = 8'h05; r[45] = 8'h01; r[46] = 8'h03; r[47] = 8'h08; r[48] = 8'h00;
    r[49] = 8'h0A;
    // string 0: language 0x0409
    r[50] = 8'h04; r[51] = 8'h03; r[52] = 8'h09; r[53] = 8'h04;
    // string 1: "GPIO" in UTF-16LE
    r[54] = 8'h0A; r[55] = 8'h03; r[56] = "G"; r[57] = 8'h00; r[58] = "P"; r[59] = 8'h00;
    r[60] = "I"; r[61] = 8'h00; r[62] = "O"; r[63] = 8'h00;
    return r;
  endfunction

  localparam rom_t ROM = contents();

  always_ff @(posedge clk) data <= ROM[addr];
endmodule
