// Addresses and lengths of the descriptors held in desc_rom, shared by the
// ROM and the GET_DESCRIPTOR handler. Layout: device (18 bytes),
// configuration with interface and two endpoint descriptors (32 bytes),
// string 0 (language list, 4 bytes), string 1 (product name, 10 bytes).
package usb_desc_pkg;
  localparam int unsigned ROM_SIZE = 64;
  localparam logic [5:0] DEV_BASE  = 6'd0;
  localparam logic [5:0] DEV_LEN   = 6'd18;
  localparam logic [5:0] CFG_BASE  = 6'd18;
  localparam logic [5:0] CFG_LEN   = 6'd32;
  localparam logic [5:0] STR0_BASE = 6'd50;
  localparam logic [5:0] STR0_LEN  = 6'd4;
  localparam logic [5:0] STR1_BASE = 6'd54;
  localparam logic [5:0] STR1_LEN  = 6'd10;
endpackage
