// Testbench for phy_rx: a host model sends packets on D+/D-; the received
// bytes, RxActive framing and the stuffing/alignment error flags are checked.
module tb_phy_rx;
  logic clk = 0, rst_n = 0;
  logic h_dp = 1, h_dm = 0, d_dp = 1, d_dm = 0, d_oe_n = 1;
  logic [1:0] line_state;
  logic rx_active, rx_valid, rx_error, err_sync, err_stuff, err_align;
  logic [7:0] rx_data, rx_data_h;
  logic       rx_valid_h;
  int checks = 0, failures = 0;
  logic [7:0] got[$];
  int n_err = 0, n_stuff = 0, n_align = 0;

  `include "tb/usb_host_tasks.svh"

  always #5 clk = !clk;

  phy_rx dut (.clk, .rst_n, .dp(h_dp), .dm(h_dm), .blank(1'b0), .line_state,
    .rx_active, .rx_valid, .rx_data, .rx_valid_h, .rx_data_h, .rx_error, .err_sync, .err_stuff, .err_align);

  // the same line into a receiver with the 16-bit output register
  logic       w_active, w_valid, w_valid_h, w_error, w_es, w_est, w_ea;
  logic [7:0] w_data, w_data_h;
  logic [1:0] w_ls;
  logic [7:0] got16[$];
  int n_pairs = 0, n_h8 = 0, n_w_late = 0;
  phy_rx #(.DATA16(1'b1)) dut16 (.clk, .rst_n, .dp(h_dp), .dm(h_dm), .blank(1'b0), .line_state(w_ls),
    .rx_active(w_active), .rx_valid(w_valid), .rx_data(w_data), .rx_valid_h(w_valid_h), .rx_data_h(w_data_h),
    .rx_error(w_error), .err_sync(w_es), .err_stuff(w_est), .err_align(w_ea));
  always @(posedge clk) if (rst_n) begin
    if (w_valid) got16.push_back(w_data);
    if (w_valid && w_valid_h) begin got16.push_back(w_data_h); n_pairs++; end
    if (w_valid_h && !w_valid) n_w_late++;
    if (w_valid && !w_active) n_w_late++;
    if (rx_valid_h) n_h8++;
  end

  always @(posedge clk) if (rst_n) begin
    if (rx_valid) got.push_back(rx_data);
    if (rx_error) n_err++;
    if (err_stuff) n_stuff++;
    if (err_align) n_align++;
  end

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    logic [7:0] b[];
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);
    check(line_state == 2'b01, "idle line state J");
    for (int t = 0; t < 6; t++) begin
      automatic int n = 1 + $urandom_range(0, 9);
      b = new[n];
      foreach (b[i]) b[i] = (t == 0) ? 8'hFF : 8'($urandom);
      got.delete(); got16.delete(); n_pairs = 0;
      h_send(b, n);
      repeat (20) @(posedge clk);
      check(got.size() == n, $sformatf("byte count %0d vs %0d", got.size(), n));
      for (int i = 0; i < n && i < got.size(); i++)
        check(got[i] == b[i], $sformatf("byte %0d %h vs %h", i, got[i], b[i]));
      check(!rx_active, "rx_active falls after EOP");
      check(got16 == got && n_pairs == n / 2, $sformatf("16-bit mode: %0d bytes in %0d pairs", got16.size(), n_pairs));
    end
    check(n_err == 0, "no error on good packets");
    check(n_h8 == 0, "8-bit mode never raises RxValidH");
    check(n_w_late == 0, "16-bit mode: RxValidH only with RxValid, all while RxActive");
    b = new[3]; b[0] = 8'hC3; b[1] = 8'hFF; b[2] = 8'hFF;
    h_send(b, 3, 1); repeat (20) @(posedge clk);
    check(n_stuff == 1 && n_err == 1, "stuffing error flagged");
    b = new[2]; b[0] = 8'hD2; b[1] = 8'h55;
    h_send(b, 2, 0, 3); repeat (20) @(posedge clk);
    check(n_align == 1 && n_err == 2, "alignment error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
