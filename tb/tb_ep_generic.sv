// Testbench for ep_generic: mode follows configuration, status follows the
// function and the token direction, toggles advance on in_ok/rx_ok and
// restart on configuration, halt set/clear and SETUP clear, and OUT bytes
// and commits only reach the function for this endpoint's OUT tokens.
module tb_ep_generic;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 2000;
  logic clk = 0, rst_n = 0;
  logic cfg_reset = 0, configured = 0, halt_set = 0, halt_clr = 0, halted;
  logic sel = 0, tok_valid = 0, rx_valid = 0, rx_ok = 0, in_ok = 0, stall_clr = 0;
  logic [3:0] tok_pid = PID_IN;
  logic [7:0] rx_data = 0, tx_data, fn_out_data;
  logic [LEN_W-1:0] tx_idx = 0, tx_len, fn_in_idx;
  ep_status_t status; ep_mode_t mode;
  logic fn_in_ready = 1, fn_out_ready = 0, fn_in_done, fn_out_start, fn_out_valid, fn_out_commit;
  int n_commit = 0, n_valid = 0;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  ep_generic dut (.clk, .rst_n, .cfg_reset, .configured, .halt_set, .halt_clr, .halted, .sel,
    .tok_valid, .tok_pid, .rx_valid, .rx_data, .rx_ok, .in_ok, .stall_clr, .tx_idx, .status,
    .mode, .tx_len, .tx_data, .fn_in_ready, .fn_in_len(LEN_W'(3)), .fn_in_idx,
    .fn_in_data(8'h70 + 8'(fn_in_idx)), .fn_in_done, .fn_out_ready, .fn_out_start,
    .fn_out_valid, .fn_out_data, .fn_out_commit);
  always @(posedge clk) begin if (fn_out_commit) n_commit++; if (fn_out_valid) n_valid++; end
  task automatic pulse(ref logic s); #1 s = 1; @(posedge clk); #1 s = 0; @(posedge clk); endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    check(mode == '0, "no tokens before configuration");
    configured <= 1; pulse(cfg_reset);
    check(mode.in_en && mode.out_en && !mode.setup_en, "IN and OUT after configuration");
    sel <= 1; tok_pid <= PID_IN; tx_idx <= 2; @(posedge clk); #1;
    check(status.ready && !status.toggle && tx_len == 3 && tx_data == 8'h72, "IN status and data");
    pulse(in_ok); #1 check(status.toggle, "IN toggle advances");
    sel <= 0; pulse(in_ok); #1 check(status.toggle, "in_ok for another endpoint ignored");
    sel <= 1; tok_pid <= PID_OUT; @(posedge clk); #1;
    check(!status.ready && !status.toggle, "OUT status follows function");
    fn_out_ready <= 1; rx_data <= 8'h44; pulse(rx_valid); pulse(rx_ok); #1;
    check(n_valid == 1 && n_commit == 1 && fn_out_data == 8'h44 && status.toggle, "OUT byte, commit, toggle");
    pulse(halt_set); #1 check(halted && status.stall, "halt set");
    pulse(halt_clr); #1 check(!halted && !status.toggle, "halt clear resets toggle");
    pulse(halt_set); pulse(stall_clr); #1 check(!halted, "SETUP clears stall");
    tok_pid <= PID_IN; @(posedge clk); pulse(in_ok); pulse(cfg_reset); #1;
    check(!status.toggle, "configuration resets toggles");
    finish_tb();
  end
endmodule
