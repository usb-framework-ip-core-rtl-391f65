// Shared body of the end-to-end usb_device testbenches: the host model,
// the line resolution, the mechanism counters and the test sequence. The
// including module instantiates the device as `dut` on bus_dp/bus_dm and
// d_dp/d_dm/d_oe_n, with the ports declared here, and adds the watchdog.
// Sequence: bus reset, GET_DESCRIPTOR (device, configuration with and
// without a trailing zero-length packet, strings), SET_ADDRESS,
// SET_CONFIGURATION, GET_CONFIGURATION, GET_STATUS, an unsupported request
// (STALL), EP1 IN reports (data, NAK, lost ACK and retry), EP1 OUT to the
// LEDs including a repeated packet, endpoint halt set/clear, a token with a
// bad CRC, a token for another address, and suspend. Each mechanism is
// counted and must have happened at least once.
  import usb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic h_dp = 1, h_dm = 0;
  logic d_dp, d_dm, d_oe_n;
  logic bus_dp, bus_dm;
  logic [7:0] switches = 8'h5A, leds;
  bus_state_t bus_state;
  logic [6:0] dev_addr;
  logic configured;
  logic [5:0] errors;
  int checks = 0, failures = 0;
  int n_nak = 0, n_stall = 0, n_zlp = 0, n_retry = 0, n_dup = 0, n_crcerr = 0,
      n_noreply = 0, n_reset = 0, n_suspend = 0, n_multi = 0;

  `include "tb/usb_host_tasks.svh"

  always #5 clk = !clk;
  assign bus_dp = d_oe_n ? h_dp : d_dp;
  assign bus_dm = d_oe_n ? h_dm : d_dm;


  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic gap(); repeat (8) @(posedge clk); endtask

  task automatic expect_hs(input logic [3:0] pid, input string m);
    logic [7:0] r[$]; int n;
    h_recv(r, n);
    check(n == 1 && r[0] == {~pid, pid}, $sformatf("%s: handshake %h (n=%0d)", m, n > 0 ? r[0] : 8'h00, n));
    gap();
  endtask

  task automatic send_setup(input logic [6:0] a, input logic [7:0] s[]);
    h_token(PID_SETUP, a, 0); gap();
    h_data(PID_DATA0, s, 8);
    expect_hs(PID_ACK, "setup ack");
  endtask

  // Control read: returns the data stage bytes.
  task automatic control_in(input logic [6:0] a, input logic [7:0] s[], output logic [7:0] d[$]);
    logic [7:0] r[$]; int n; logic tog = 1; int pkts = 0;
    d.delete();
    send_setup(a, s);
    forever begin
      h_token(PID_IN, a, 0);
      h_recv(r, n);
      if (n == 1 && r[0] == 8'h1E) begin n_stall++; d.delete(); gap(); return; end
      check(n >= 3 && r[0] == (tog ? 8'h4B : 8'hC3), "data stage PID/toggle");
      if (n < 3) begin gap(); return; end
      begin
        logic [7:0] p[] = new[n - 3];
        foreach (p[i]) p[i] = r[i + 1];
        check({r[n-1], r[n-2]} == h_crc16(p, n - 3), "data stage CRC16");
        foreach (p[i]) d.push_back(p[i]);
      end
      gap(); h_handshake(PID_ACK); gap();
      pkts++;
      if (n - 3 == 0) n_zlp++;
      tog = !tog;
      if (n - 3 < 8 || d.size() == {s[7], s[6]}) break;
    end
    if (pkts > 1) n_multi++;
    h_token(PID_OUT, a, 0); gap();
    h_data(PID_DATA1, '{}, 0);
    expect_hs(PID_ACK, "status out ack");
  endtask

  task automatic control_nodata(input logic [6:0] a, input logic [7:0] s[], output bit stalled);
    logic [7:0] r[$]; int n;
    send_setup(a, s);
    h_token(PID_IN, a, 0);
    h_recv(r, n);
    stalled = (n == 1 && r[0] == 8'h1E);
    if (stalled) n_stall++;
    else check(n == 3 && r[0] == 8'h4B && r[1] == 0 && r[2] == 0, "status stage ZLP DATA1");
    gap(); if (!stalled) h_handshake(PID_ACK); gap();
  endtask

  task automatic ep1_in(input logic [6:0] a, output int n, output logic [7:0] r[$], input bit ack = 1);
    h_token(PID_IN, a, 1);
    h_recv(r, n);
    gap();
    if (ack && n >= 3) begin h_handshake(PID_ACK); gap(); end
  endtask

  task automatic ep1_out(input logic [6:0] a, input logic [3:0] pid, input logic [7:0] v, output int n, output logic [7:0] r[$]);
    logic [7:0] d[] = new[1];
    d[0] = v;
    h_token(PID_OUT, a, 1); gap();
    h_data(pid, d, 1);
    h_recv(r, n); gap();
  endtask

  initial begin
    logic [7:0] d[$], r[$];
    logic [7:0] s[];
    bit st;
    int n, t0, t1;
    repeat (10) @(posedge clk); rst_n = 1; repeat (10) @(posedge clk);
    // bus reset: SE0 for 3 us
    h_dp = 0; h_dm = 0; repeat (150) @(posedge clk);
    check(bus_state == BUS_RESET, "bus reset detected");
    if (bus_state == BUS_RESET) n_reset++;
    h_dp = 1; h_dm = 0; repeat (20) @(posedge clk);
    check(bus_state == BUS_ACTIVE, "active after reset");

    // GET_DESCRIPTOR(device), wLength 64: 18 bytes in 8+8+2
    s = '{8'h80, 8'h06, 8'h00, 8'h01, 8'h00, 8'h00, 8'h40, 8'h00};
    control_in(0, s, d);
    check(d.size() == 18, $sformatf("device descriptor length %0d", d.size()));
    if (d.size() == 18)
      check(d[0] == 8'h12 && d[1] == 8'h01 && d[7] == 8'h08 && d[8] == 8'h09 && d[9] == 8'h12 && d[17] == 8'h01,
            "device descriptor contents");

    // SET_ADDRESS 5
    s = '{8'h00, 8'h05, 8'h05, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    control_nodata(0, s, st);
    check(!st && dev_addr == 7'd5, "address set after status stage");

    // old address no longer answered
    h_token(PID_IN, 0, 0);
    h_recv(r, n, 200);
    check(n == -1, "no reply at old address"); if (n == -1) n_noreply++;
    gap();

    // GET_DESCRIPTOR(configuration) wLength 32 (exact, no ZLP), then 255 (ZLP)
    s = '{8'h80, 8'h06, 8'h00, 8'h02, 8'h00, 8'h00, 8'h20, 8'h00};
    control_in(5, s, d);
    check(d.size() == 32 && d[0] == 8'h09 && d[2] == 8'h20 && d[14] == 8'hFF && d[38-18] == 8'h81,
          "configuration descriptor, exact length");
    begin
      automatic int z0 = n_zlp;
      s = '{8'h80, 8'h06, 8'h00, 8'h02, 8'h00, 8'h00, 8'hFF, 8'h00};
      control_in(5, s, d);
      check(d.size() == 32 && n_zlp == z0 + 1, "configuration descriptor ends with ZLP");
    end
    // string 1
    s = '{8'h80, 8'h06, 8'h01, 8'h03, 8'h09, 8'h04, 8'hFF, 8'h00};
    control_in(5, s, d);
    check(d.size() == 10 && d[2] == "G" && d[8] == "O", "string descriptor");

    // unsupported descriptor type -> STALL
    begin
      automatic int s0 = n_stall;
      s = '{8'h80, 8'h06, 8'h00, 8'h06, 8'h00, 8'h00, 8'h0A, 8'h00};
      control_in(5, s, d);
      check(n_stall == s0 + 1, "unsupported request stalled");
    end

    // EP1 before configuration: no reply
    ep1_in(5, n, r);
    check(n == -1, "EP1 silent before configuration"); if (n == -1) n_noreply++;

    // SET_CONFIGURATION 1, GET_CONFIGURATION
    s = '{8'h00, 8'h09, 8'h01, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    control_nodata(5, s, st);
    check(!st && configured, "configured");
    s = '{8'h80, 8'h08, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01, 8'h00};
    control_in(5, s, d);
    check(d.size() == 1 && d[0] == 8'h01, "GET_CONFIGURATION");

    // EP1 IN: first report, DATA0
    ep1_in(5, n, r);
    check(n == 4 && r[0] == 8'hC3 && r[1] == 8'h5A, "EP1 IN report DATA0");
    // no change: NAK
    ep1_in(5, n, r);
    check(n == 1 && r[0] == 8'h5A, "EP1 IN NAK when unchanged"); if (n == 1 && r[0] == 8'h5A) n_nak++;
    // change switches, lose the ACK: same toggle again
    switches = 8'hA5; repeat (10) @(posedge clk);
    ep1_in(5, n, r, 0);
    check(n == 4 && r[0] == 8'h4B && r[1] == 8'hA5, "EP1 IN report DATA1");
    repeat (120) @(posedge clk);
    ep1_in(5, n, r);
    check(n == 4 && r[0] == 8'h4B && r[1] == 8'hA5, "retry after lost ACK keeps DATA1");
    if (n == 4 && r[0] == 8'h4B) n_retry++;

    // EP1 OUT: LEDs
    ep1_out(5, PID_DATA0, 8'h3C, n, r);
    check(n == 1 && r[0] == 8'hD2 && leds == 8'h3C, "EP1 OUT ACK and LEDs");
    ep1_out(5, PID_DATA0, 8'hFF, n, r);
    check(n == 1 && r[0] == 8'hD2 && leds == 8'h3C, "repeated OUT ACKed and dropped");
    if (leds == 8'h3C) n_dup++;
    ep1_out(5, PID_DATA1, 8'h81, n, r);
    check(n == 1 && r[0] == 8'hD2 && leds == 8'h81, "next OUT DATA1");

    // endpoint halt: SET_FEATURE(ENDPOINT_HALT, EP1 IN)
    s = '{8'h02, 8'h03, 8'h00, 8'h00, 8'h81, 8'h00, 8'h00, 8'h00};
    control_nodata(5, s, st);
    switches = 8'h11; repeat (10) @(posedge clk);
    ep1_in(5, n, r);
    check(n == 1 && r[0] == 8'h1E, "halted EP1 STALLs"); if (n == 1 && r[0] == 8'h1E) n_stall++;
    s = '{8'h82, 8'h00, 8'h00, 8'h00, 8'h81, 8'h00, 8'h02, 8'h00};
    control_in(5, s, d);
    check(d.size() == 2 && d[0] == 8'h01, "GET_STATUS shows halt");
    s = '{8'h02, 8'h01, 8'h00, 8'h00, 8'h81, 8'h00, 8'h00, 8'h00};
    control_nodata(5, s, st);
    ep1_in(5, n, r);
    check(n == 4 && r[0] == 8'hC3 && r[1] == 8'h11, "after CLEAR_FEATURE: DATA0 report");

    // token with a bad CRC: no reply, CRC error strobe
    begin
      automatic logic [7:0] b[] = new[3];
      automatic int e0 = n_crcerr;
      b[0] = 8'h69; b[1] = 8'h85; b[2] = 8'h00;
      fork
        begin h_send(b, 3); repeat (40) @(posedge clk); end
        begin repeat (400) @(posedge clk); end
        forever begin @(posedge clk); if (errors[2]) n_crcerr++; end
      join_any
      disable fork;
      check(n_crcerr > e0, "CRC error reported");
      h_recv(r, n, 100);
      check(n == -1, "no reply to corrupted token");
    end

    ep1_out(5, PID_DATA0, 8'h42, n, r);
    check(leds == 8'h42, "LEDs after halt clear (toggle reset)");

    // suspend: 3 ms of idle J
    t0 = $time;
    repeat (144100) @(posedge clk);
    check(bus_state == BUS_SUSPEND, "suspend after 3 ms idle");
    if (bus_state == BUS_SUSPEND) n_suspend++;
    h_token(PID_IN, 5, 1); h_recv(r, n);
    check(bus_state == BUS_ACTIVE, "resume on bus activity");

    check(n_nak > 0 && n_stall > 0 && n_zlp > 0 && n_retry > 0 && n_dup > 0 && n_crcerr > 0 &&
          n_noreply > 0 && n_reset > 0 && n_suspend > 0 && n_multi > 0, "every mechanism exercised");
    $display("mechanisms: nak=%0d stall=%0d zlp=%0d retry=%0d dup=%0d crcerr=%0d noreply=%0d reset=%0d suspend=%0d multi=%0d",
             n_nak, n_stall, n_zlp, n_retry, n_dup, n_crcerr, n_noreply, n_reset, n_suspend, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

