// Testbench for ep0_base driven at its endpoint interface, with a model
// request handler for vendor request 0x42 (device-to-host, 20 bytes whose
// value is 0x30 plus the offset). Checks the stage sequencing (data IN in
// 8-byte packets with alternating toggles, short or zero-length last
// packet, status stages), SET_ADDRESS taking effect after the status
// stage, SET/GET_CONFIGURATION, GET_STATUS, ENDPOINT_HALT, STALL of an
// unsupported request and its clearing by the next SETUP, and bus reset.
module tb_ep0_base;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 20000;
  logic clk = 0, rst_n = 0, usb_rst = 0;
  logic sel = 1, tok_valid = 0, rx_valid = 0, rx_ok = 0, in_ok = 0, stall_clr = 0;
  logic [3:0] tok_pid = PID_SETUP;
  logic [7:0] rx_data = 0, tx_data;
  logic [LEN_W-1:0] tx_idx = 0, tx_len;
  ep_status_t status; ep_mode_t mode;
  logic [6:0] dev_addr; logic configured, cfg_reset, h_done;
  logic [1:0] halt_set, halt_clr, halted = 2'b10;
  setup_t setup; logic [15:0] rd_addr;
  logic h_claim; logic [15:0] h_len = 16'd20;
  int n_zlp = 0, n_cfgrst = 0, n_hset = 0, n_hclr = 0, n_done = 0;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  assign h_claim = (setup.bmRequestType == 8'hC0) && (setup.bRequest == 8'h42);
  ep0_base #(.MPS(8), .NUM_EP(2)) dut (.clk, .rst_n, .usb_rst, .sel, .tok_valid, .tok_pid,
    .rx_valid, .rx_data, .rx_ok, .in_ok, .stall_clr, .tx_idx, .status, .mode, .tx_len, .tx_data,
    .dev_addr, .configured, .cfg_reset, .halt_set, .halt_clr, .halted, .setup, .rd_addr,
    .h_claim, .h_len, .h_data(8'h30 + rd_addr[7:0]), .h_done);
  always @(posedge clk) if (rst_n) begin
    if (cfg_reset) n_cfgrst++;
    if (halt_set[1]) n_hset++;
    if (halt_clr[1]) n_hclr++;
    if (h_done) n_done++;
  end
  task automatic strobe(ref logic s); #1 s = 1; @(posedge clk); #1 s = 0; endtask
  task automatic do_setup(input logic [7:0] b[8]);
    #1 tok_pid = PID_SETUP; strobe(tok_valid); strobe(stall_clr);
    foreach (b[i]) begin #1 rx_data = b[i]; strobe(rx_valid); end
    strobe(rx_ok); repeat (3) @(posedge clk); #1;
  endtask
  // IN data stage: returns the bytes; checks toggles
  task automatic data_in(output logic [7:0] d[$]);
    logic tog = 1;
    d.delete();
    #1 tok_pid = PID_IN;
    forever begin
      int l;
      @(posedge clk); #1;
      check(status.ready && !status.stall && status.toggle == tog, "data stage ready, toggle");
      l = tx_len;
      if (l == 0) n_zlp++;
      for (int i = 0; i < l; i++) begin
        #1 tx_idx = LEN_W'(i); @(posedge clk); #1 d.push_back(tx_data);
      end
      strobe(in_ok); tog = !tog; @(posedge clk); #1;
      if (l < 8 || d.size() == setup.wLength) break;
    end
  endtask
  task automatic status_out();
    #1 tok_pid = PID_OUT; @(posedge clk); #1;
    check(status.ready && status.toggle, "status OUT stage ready, DATA1");
    strobe(rx_ok); @(posedge clk); #1;
    tok_pid = PID_IN; @(posedge clk); #1;
    check(!status.ready, "idle after status");
  endtask
  task automatic status_in();
    #1 tok_pid = PID_IN; @(posedge clk); #1;
    check(status.ready && status.toggle && tx_len == 0, "status IN stage: ZLP DATA1");
    strobe(in_ok); @(posedge clk); #1;
  endtask
  initial begin
    logic [7:0] d[$];
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    check(mode.in_en && mode.out_en && mode.setup_en, "EP0 supports all tokens");
    // SET_ADDRESS 0x2A
    do_setup('{8'h00, 8'h05, 8'h2A, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    check(dev_addr == 0, "address not yet applied");
    status_in();
    check(dev_addr == 7'h2A, "address applied after status stage");
    // vendor request, 20 bytes: 8 + 8 + 4
    do_setup('{8'hC0, 8'h42, 8'h00, 8'h00, 8'h00, 8'h00, 8'h40, 8'h00});
    data_in(d);
    check(d.size() == 20, $sformatf("handler data length %0d", d.size()));
    foreach (d[i]) check(d[i] == 8'h30 + 8'(i), "handler data");
    status_out();
    check(n_done == 2, "handler done after status");
    // wLength shorter than the data: 16 bytes, exactly two packets, no ZLP
    do_setup('{8'hC0, 8'h42, 8'h00, 8'h00, 8'h00, 8'h00, 8'h10, 8'h00});
    data_in(d); check(d.size() == 16, "truncated to wLength");
    status_out();
    // data ends on a packet boundary below wLength: ZLP
    h_len = 16'd16;
    do_setup('{8'hC0, 8'h42, 8'h00, 8'h00, 8'h00, 8'h00, 8'h40, 8'h00});
    data_in(d); check(d.size() == 16, "16 bytes");
    check(n_zlp == 1, "zero-length packet ends the stage");
    status_out();
    // unsupported request: STALL until next SETUP
    do_setup('{8'hC0, 8'h43, 8'h00, 8'h00, 8'h00, 8'h00, 8'h04, 8'h00});
    #1 tok_pid = PID_IN; @(posedge clk); #1; check(status.stall, "unsupported request stalled");
    #1 tok_pid = PID_OUT; @(posedge clk); #1; check(status.stall, "stall in both directions");
    // SET_CONFIGURATION 1, GET_CONFIGURATION
    do_setup('{8'h00, 8'h09, 8'h01, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    check(!status.stall && configured && n_cfgrst == 1, "configured, toggles reset");
    status_in();
    do_setup('{8'h80, 8'h08, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01, 8'h00});
    data_in(d); check(d.size() == 1 && d[0] == 8'h01, "GET_CONFIGURATION");
    status_out();
    // GET_STATUS endpoint 1 (halted)
    do_setup('{8'h82, 8'h00, 8'h00, 8'h00, 8'h81, 8'h00, 8'h02, 8'h00});
    data_in(d); check(d.size() == 2 && d[0] == 8'h01 && d[1] == 8'h00, "GET_STATUS endpoint halt");
    status_out();
    // SET_FEATURE / CLEAR_FEATURE ENDPOINT_HALT on EP1
    do_setup('{8'h02, 8'h03, 8'h00, 8'h00, 8'h81, 8'h00, 8'h00, 8'h00});
    check(n_hset == 1, "halt set strobe"); status_in();
    do_setup('{8'h02, 8'h01, 8'h00, 8'h00, 8'h81, 8'h00, 8'h00, 8'h00});
    check(n_hclr == 1, "halt clear strobe"); status_in();
    // bus reset
    #1 usb_rst = 1; @(posedge clk); #1 usb_rst = 0; @(posedge clk); #1;
    check(dev_addr == 0 && !configured, "bus reset clears address and configuration");
    finish_tb();
  end
endmodule
