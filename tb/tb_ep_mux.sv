// Testbench for ep_mux: for every endpoint number the select is one-hot and
// the selected endpoint's status, mode, length and data come through;
// numbers with no endpoint read as all zero (no supported token).
module tb_ep_mux;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 1000;
  localparam int N = 3;
  logic clk = 0;
  logic [3:0] tok_ep;
  logic [N-1:0] ep_sel;
  ep_status_t st_i [N]; ep_mode_t md_i [N]; logic [LEN_W-1:0] len_i [N]; logic [7:0] dat_i [N];
  ep_status_t st; ep_mode_t md; logic [LEN_W-1:0] len; logic [7:0] dat;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  ep_mux #(.NUM_EP(N)) dut (.tok_ep, .ep_sel, .ep_status_i(st_i), .ep_mode_i(md_i),
    .ep_len_i(len_i), .ep_data_i(dat_i), .ep_status(st), .ep_mode(md), .ep_len(len), .ep_data(dat));
  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < N; i++) begin
        st_i[i] = 3'($urandom); md_i[i] = 3'($urandom) | 3'b001;
        len_i[i] = LEN_W'($urandom); dat_i[i] = 8'($urandom);
      end
      for (int e = 0; e < 16; e++) begin
        tok_ep = 4'(e); #1;
        if (e < N) check(ep_sel == N'(1 << e) && st == st_i[e] && md == md_i[e] &&
                         len == len_i[e] && dat == dat_i[e], $sformatf("route ep %0d", e));
        else check(ep_sel == '0 && md == '0, $sformatf("absent ep %0d", e));
      end
    end
    finish_tb();
  end
endmodule
