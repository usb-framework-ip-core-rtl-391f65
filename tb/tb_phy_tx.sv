// Testbench for phy_tx: bytes are pushed through the UTMI TxValid/TxReady
// handshake and the host model decodes the D+/D- waveform (SYNC, NRZI,
// stuffing, EOP). Checks the bytes, the bit rate (4 clocks per bit) and /OE.
// A second instance in 16-bit mode is then fed words (TxValidH low on the
// last word of an odd-length packet) and must send the same byte stream.
module tb_phy_tx;
  logic clk = 0, rst_n = 0;
  logic h_dp, h_dm;
  logic d_dp, d_dm, d_oe_n, tx_active;
  logic tx_valid = 0, tx_ready;
  logic [7:0] tx_data = 0;
  int checks = 0, failures = 0;

  `include "tb/usb_host_tasks.svh"

  always #5 clk = !clk;

  logic n_dp, n_dm, n_oe_n, w_dp, w_dm, w_oe_n, w_active, w_ready;
  logic sel16 = 0, w_valid = 0, w_valid_h = 0;
  logic [7:0] w_data = 0, w_data_h = 0;
  phy_tx dut (.clk, .rst_n, .tx_valid, .tx_data, .tx_valid_h(1'b1), .tx_data_h(8'hA5), .tx_ready,
    .dp(n_dp), .dm(n_dm), .oe_n(n_oe_n), .tx_active);
  phy_tx #(.DATA16(1'b1)) dut16 (.clk, .rst_n, .tx_valid(w_valid), .tx_data(w_data),
    .tx_valid_h(w_valid_h), .tx_data_h(w_data_h), .tx_ready(w_ready),
    .dp(w_dp), .dm(w_dm), .oe_n(w_oe_n), .tx_active(w_active));
  // the host model listens to one instance at a time
  assign d_dp   = sel16 ? w_dp   : n_dp;
  assign d_dm   = sel16 ? w_dm   : n_dm;
  assign d_oe_n = sel16 ? w_oe_n : n_oe_n;

  task automatic push16(input logic [7:0] b[]);
    for (int i = 0; i < b.size(); i += 2) begin
      w_valid <= 1; w_data <= b[i];
      w_valid_h <= (i + 1 < b.size()); w_data_h <= (i + 1 < b.size()) ? b[i+1] : 8'h00;
      do @(posedge clk); while (!w_ready);
    end
    w_valid <= 0; w_valid_h <= 0;
  endtask

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic push(input logic [7:0] b[]);
    foreach (b[i]) begin
      tx_valid <= 1; tx_data <= b[i];
      do @(posedge clk); while (!tx_ready);
    end
    tx_valid <= 0;
  endtask

  initial begin
    logic [7:0] b[];
    logic [7:0] r[$];
    int n, t0, t1;
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);
    check(d_oe_n && d_dp && !d_dm, "idle J, output disabled");
    for (int t = 0; t < 6; t++) begin
      automatic int len = 1 + $urandom_range(0, 8);
      b = new[len];
      foreach (b[i]) b[i] = (t < 2) ? 8'hFF : 8'($urandom);
      t0 = $time;
      fork push(b); h_recv(r, n); join
      check(n == len, $sformatf("length %0d vs %0d", n, len));
      for (int i = 0; i < len && i < r.size(); i++)
        check(r[i] == b[i], $sformatf("byte %0d %h vs %h", i, r[i], b[i]));
      wait (d_oe_n); t1 = $time;
      // SYNC + data + EOP(3) bits, at least 4 clocks (40 ns) each, plus stuffing
      check((t1 - t0) / 40 >= 8 + 8 * len + 3, "bit rate no faster than 12 Mb/s");
      check((t1 - t0) / 40 <= 8 + 8 * len + 2 * len + 5, "bit rate 12 Mb/s");
    end
    // 16-bit mode; the 8-bit instance's TxValidH (tied high) must not matter
    sel16 = 1;
    for (int t = 0; t < 6; t++) begin
      automatic int len = 1 + $urandom_range(0, 8);
      if (t < 2) len = 3 + 2 * t;
      b = new[len];
      foreach (b[i]) b[i] = (t == 0) ? 8'hFF : 8'($urandom);
      fork push16(b); h_recv(r, n); join
      check(n == len, $sformatf("16-bit mode: length %0d vs %0d", n, len));
      for (int i = 0; i < len && i < r.size(); i++)
        check(r[i] == b[i], $sformatf("16-bit mode: byte %0d %h vs %h", i, r[i], b[i]));
      wait (w_oe_n);
    end
    check(n_oe_n, "8-bit instance idle");
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
