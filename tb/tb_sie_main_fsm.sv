// Testbench for sie_main_fsm with the unpacker, packer and time-out replaced
// by stimulus: checks the reply chosen for IN, OUT and SETUP tokens against
// EP Status and EP Mode (DATA0/1, ACK, NAK, STALL, no reply), the data
// toggle check, the rx_en/rx_ok/in_ok/stall_clr strobes, address matching,
// corrupted packets and the ACK time-out.
module tb_sie_main_fsm;
  import usb_pkg::*;
  localparam int WATCHDOG_CYCLES = 20000;
  logic clk = 0, rst_n = 0, usb_rst = 0;
  logic [6:0] dev_addr = 7'd9;
  logic got_pk = 0, pk_err = 0, rx_active = 0, pk_done = 0, timeout = 0;
  logic [3:0] pk_pid = 0, pk_ep = 0, cur_pid = 0;
  logic [6:0] pk_addr = 0;
  logic send, to_restart, tok_valid, rx_en, rx_ok, in_ok, stall_clr;
  logic [3:0] send_pid, tok_ep, tok_pid;
  ep_status_t ep_status = '0;
  ep_mode_t ep_mode = '{1'b1, 1'b1, 1'b1};
  int n_send = 0, n_rxok = 0, n_inok = 0, n_sclr = 0, n_rxen = 0, n_tok = 0;
  logic [3:0] last_pid;
  `include "tb/tb_check.svh"
  always #5 clk = !clk;
  sie_main_fsm dut (.clk, .rst_n, .usb_rst, .dev_addr, .got_pk, .pk_err, .pk_pid, .pk_addr,
    .pk_ep, .cur_pid, .rx_active, .send, .send_pid, .pk_done, .to_restart, .timeout,
    .tok_valid, .tok_ep, .tok_pid, .ep_status, .ep_mode, .rx_en, .rx_ok, .in_ok, .stall_clr);
  always @(posedge clk) begin
    if (send) begin n_send++; last_pid <= send_pid; end
    if (rx_ok) n_rxok++;
    if (in_ok) n_inok++;
    if (stall_clr) n_sclr++;
    if (rx_en) n_rxen++;
    if (tok_valid) n_tok++;
  end
  // packer model: done 20 clocks after send
  initial forever begin
    @(posedge clk);
    if (send) begin repeat (20) @(posedge clk); pk_done <= 1; @(posedge clk); pk_done <= 0; end
  end
  task automatic pk(input logic [3:0] pid, input logic [6:0] a = 7'd9, input logic [3:0] e = 4'd1,
                    input bit err = 0);
    pk_pid <= pid; pk_addr <= a; pk_ep <= e; pk_err <= err; got_pk <= 1;
    @(posedge clk); got_pk <= 0; pk_err <= 0;
  endtask
  task automatic data(input logic [3:0] pid, input bit err = 0);
    cur_pid <= pid; rx_active <= 1; repeat (10) @(posedge clk);
    rx_active <= 0; pk(pid, 0, 0, err);
  endtask
  task automatic settle(); repeat (40) @(posedge clk); endtask
  task automatic reset_counts(); n_send = 0; n_rxok = 0; n_inok = 0; n_sclr = 0; n_rxen = 0; n_tok = 0; endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    // IN, ready, DATA1, ACKed
    ep_status <= '{stall: 0, ready: 1, toggle: 1};
    reset_counts(); pk(PID_IN); settle();
    check(n_tok == 1 && tok_ep == 1 && tok_pid == PID_IN, "token info");
    check(n_send == 1 && last_pid == PID_DATA1, "IN -> DATA1");
    pk(PID_ACK, 0, 0); settle();
    check(n_inok == 1, "ACK -> in_ok");
    // IN, ACK lost: time-out, no in_ok
    reset_counts(); pk(PID_IN); settle();
    timeout <= 1; repeat (3) @(posedge clk); timeout <= 0; settle();
    pk(PID_ACK, 0, 0); settle();
    check(n_inok == 0, "late ACK after time-out ignored");
    // IN, not ready -> NAK; stalled -> STALL; mode off -> nothing
    ep_status <= '{stall: 0, ready: 0, toggle: 0};
    reset_counts(); pk(PID_IN); settle();
    check(n_send == 1 && last_pid == PID_NAK, "IN not ready -> NAK");
    ep_status <= '{stall: 1, ready: 1, toggle: 0};
    reset_counts(); pk(PID_IN); settle();
    check(n_send == 1 && last_pid == PID_STALL, "IN stalled -> STALL");
    ep_mode <= '{in_en: 0, out_en: 1, setup_en: 0};
    reset_counts(); pk(PID_IN); settle();
    check(n_send == 0, "IN not supported -> no reply");
    ep_mode <= '{1'b1, 1'b1, 1'b1};
    // OUT DATA0, toggle 0, ready -> ACK + rx_ok, bytes enabled
    ep_status <= '{stall: 0, ready: 1, toggle: 0};
    reset_counts(); pk(PID_OUT); repeat (3) @(posedge clk); data(PID_DATA0); settle();
    check(n_send == 1 && last_pid == PID_ACK && n_rxok == 1 && n_rxen > 0, "OUT -> ACK, data taken");
    // OUT DATA1 while expecting DATA0: ACK, dropped
    reset_counts(); pk(PID_OUT); repeat (3) @(posedge clk); data(PID_DATA1); settle();
    check(n_send == 1 && last_pid == PID_ACK && n_rxok == 0 && n_rxen == 0, "wrong toggle -> ACK, dropped");
    // OUT not ready -> NAK
    ep_status <= '{stall: 0, ready: 0, toggle: 0};
    reset_counts(); pk(PID_OUT); repeat (3) @(posedge clk); data(PID_DATA0); settle();
    check(n_send == 1 && last_pid == PID_NAK && n_rxok == 0 && n_rxen == 0, "OUT not ready -> NAK");
    // OUT stalled -> STALL
    ep_status <= '{stall: 1, ready: 1, toggle: 0};
    reset_counts(); pk(PID_OUT); repeat (3) @(posedge clk); data(PID_DATA0); settle();
    check(n_send == 1 && last_pid == PID_STALL, "OUT stalled -> STALL");
    // corrupted data: no reply
    ep_status <= '{stall: 0, ready: 1, toggle: 0};
    reset_counts(); pk(PID_OUT); repeat (3) @(posedge clk); data(PID_DATA0, 1); settle();
    check(n_send == 0 && n_rxok == 0, "corrupted data -> no reply");
    // SETUP on a stalled endpoint: stall cleared, ACK, rx_ok
    ep_status <= '{stall: 1, ready: 0, toggle: 1};
    reset_counts(); pk(PID_SETUP, 7'd9, 4'd0); repeat (3) @(posedge clk); data(PID_DATA0); settle();
    check(n_sclr == 1 && n_send == 1 && last_pid == PID_ACK && n_rxok == 1 && n_rxen > 0, "SETUP -> stall_clr, ACK");
    // other address, corrupted token: ignored
    reset_counts(); pk(PID_IN, 7'd3); pk(PID_IN, 7'd9, 1, 1); settle();
    check(n_tok == 0 && n_send == 0, "foreign or corrupted token ignored");
    finish_tb();
  end
endmodule
