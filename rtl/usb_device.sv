// Full-speed USB device built from the layered core:
//   PHY (UTMI, 8 or 16 bit)  ->  SIE  ->  endpoint mux (adaptation layer)
//   ->  EP0 Base + request mux + GET_DESCRIPTOR handler + descriptor ROM
//       (protocol layer, all in hardware)
//   ->  EP1 (unbuffered)  ->  GPIO function (application layer).
// One 48 MHz clock runs everything (4 samples per 12 Mb/s bit). The D+/D-
// pins go to an external driver or resistor network: the line is received
// on dp_i/dm_i and driven on dp_o/dm_o while oe_n is low. The host sees a
// device with one configuration whose EP1 OUT writes the LED byte and whose
// EP1 IN reports the switch byte whenever it changes. Bus state, the
// assigned address and the PHY/SIE error strobes are brought out for
// monitoring. DATA16 selects the 16-bit UTMI data bus between PHY and SIE
// (default 8 bits); the device behaves the same on the USB either way.
module usb_device
  import usb_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 48_000_000,
  parameter int unsigned EP0_MPS = 8,
  parameter bit          DATA16  = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dp_i,
  input  logic       dm_i,
  output logic       dp_o,
  output logic       dm_o,
  output logic       oe_n,
  input  logic [7:0] switches,
  output logic [7:0] leds,
  output bus_state_t bus_state,
  output logic [6:0] dev_addr,
  output logic       configured,
  output logic [5:0] errors      // {sync, stuff, align, crc, pid, incomplete}
);
  localparam int unsigned NUM_EP = 2;

  // UTMI
  logic [1:0] line_state;
  logic       tx_valid, tx_ready, rx_active, rx_valid, rx_error;
  logic [7:0] tx_data, rx_data;
  logic       rx_valid_h, tx_valid_h;
  logic [7:0] rx_data_h, tx_data_h;
  logic       err_sync, err_stuff, err_align, err_crc, err_pid, err_inc;

  // endpoint bus
  logic             usb_rst, tok_valid, ep_rx_valid, rx_ok, in_ok, stall_clr;
  logic [3:0]       tok_ep, tok_pid;
  logic [7:0]       ep_rx_data;
  logic [LEN_W-1:0] ep_tx_idx, ep_len;
  ep_status_t       ep_status;
  ep_mode_t         ep_mode;
  logic [7:0]       ep_data;
  logic [NUM_EP-1:0] ep_sel;
  ep_status_t       st_a [NUM_EP];
  ep_mode_t         md_a [NUM_EP];
  logic [LEN_W-1:0] len_a [NUM_EP];
  logic [7:0]       dat_a [NUM_EP];

  // EP0 / requests
  logic             cfg_reset, h_claim, h_done;
  logic [NUM_EP-1:0] halt_set, halt_clr, halted;
  setup_t           setup;
  logic [15:0]      rd_addr, h_len;
  logic [7:0]       h_data;
  logic [0:0]       hc, hsel;
  logic [15:0]      hl [1];
  logic [7:0]       hd [1];
  logic [5:0]       rom_addr;
  logic [7:0]       rom_data;

  // EP1 / function
  logic             f_in_ready, f_out_ready, f_in_done, f_out_start, f_out_valid, f_out_commit;
  logic [LEN_W-1:0] f_in_len, f_in_idx;
  logic [7:0]       f_in_data, f_out_data;

  usb_phy #(.DATA16(DATA16)) u_phy (.clk, .rst_n, .dp_i, .dm_i, .dp_o, .dm_o, .oe_n, .line_state,
    .tx_valid, .tx_data, .tx_valid_h, .tx_data_h, .tx_ready,
    .rx_active, .rx_valid, .rx_data, .rx_valid_h, .rx_data_h, .rx_error,
    .err_sync, .err_stuff, .err_align);

  usb_sie #(.CLK_HZ(CLK_HZ), .DATA16(DATA16)) u_sie (.clk, .rst_n, .line_state, .rx_active,
    .rx_valid, .rx_data, .rx_valid_h, .rx_data_h, .rx_error, .tx_valid, .tx_data, .tx_valid_h,
    .tx_data_h, .tx_ready, .dev_addr, .bus_state, .usb_rst,
    .tok_valid, .tok_ep, .tok_pid, .ep_status, .ep_mode, .ep_rx_valid, .ep_rx_data,
    .rx_ok, .in_ok, .stall_clr, .ep_tx_len(ep_len), .ep_tx_data(ep_data), .ep_tx_idx,
    .err_crc, .err_pid, .err_incomplete(err_inc));

  ep_mux #(.NUM_EP(NUM_EP)) u_mux (.tok_ep, .ep_sel, .ep_status_i(st_a), .ep_mode_i(md_a),
    .ep_len_i(len_a), .ep_data_i(dat_a), .ep_status, .ep_mode, .ep_len, .ep_data);

  ep0_base #(.MPS(EP0_MPS), .NUM_EP(NUM_EP)) u_ep0 (.clk, .rst_n, .usb_rst,
    .sel(ep_sel[0]), .tok_valid, .tok_pid, .rx_valid(ep_rx_valid), .rx_data(ep_rx_data),
    .rx_ok, .in_ok, .stall_clr, .tx_idx(ep_tx_idx), .status(st_a[0]), .mode(md_a[0]),
    .tx_len(len_a[0]), .tx_data(dat_a[0]), .dev_addr, .configured, .cfg_reset,
    .halt_set, .halt_clr, .halted, .setup, .rd_addr, .h_claim, .h_len, .h_data, .h_done);

  req_mux #(.N(1)) u_rmux (.claim_i(hc), .len_i(hl), .data_i(hd), .sel(hsel),
    .claim(h_claim), .len(h_len), .data(h_data));

  get_descriptor u_gd (.setup, .rd_addr, .claim(hc[0]), .len(hl[0]), .rom_addr,
    .rom_data, .data(hd[0]));

  desc_rom u_rom (.clk, .addr(rom_addr), .data(rom_data));

  assign halted[0] = 1'b0;

  ep_generic u_ep1 (.clk, .rst_n, .cfg_reset, .configured, .halt_set(halt_set[1]),
    .halt_clr(halt_clr[1]), .halted(halted[1]), .sel(ep_sel[1]), .tok_valid, .tok_pid,
    .rx_valid(ep_rx_valid), .rx_data(ep_rx_data), .rx_ok, .in_ok, .stall_clr,
    .tx_idx(ep_tx_idx), .status(st_a[1]), .mode(md_a[1]), .tx_len(len_a[1]),
    .tx_data(dat_a[1]), .fn_in_ready(f_in_ready), .fn_in_len(f_in_len),
    .fn_in_idx(f_in_idx), .fn_in_data(f_in_data), .fn_in_done(f_in_done),
    .fn_out_ready(f_out_ready), .fn_out_start(f_out_start), .fn_out_valid(f_out_valid),
    .fn_out_data(f_out_data), .fn_out_commit(f_out_commit));

  gpio_function u_fn (.clk, .rst_n, .switches, .leds, .in_ready(f_in_ready),
    .in_len(f_in_len), .in_idx(f_in_idx), .in_data(f_in_data), .in_done(f_in_done),
    .out_ready(f_out_ready), .out_start(f_out_start), .out_valid(f_out_valid),
    .out_data(f_out_data), .out_commit(f_out_commit));

  assign errors = {err_sync, err_stuff, err_align, err_crc, err_pid, err_inc};

  // GET_DESCRIPTOR has no side effects on completion.
  logic unused;
  assign unused = ^{h_done, hsel, halt_set[0], halt_clr[0]};
endmodule
