// End-to-end testbench for usb_device built with the 16-bit UTMI data bus
// between PHY and SIE (DATA16 = 1). The host sees the same device, so the
// sequence and checks are the same as for the 8-bit build
// (usb_device_test.svh): enumeration, EP1 traffic, error cases and every
// protocol mechanism at least once, now with words crossing the PHY/SIE
// boundary, odd-length packets included.
module tb_usb_device16;
  `include "tb/usb_device_test.svh"

  usb_device #(.DATA16(1'b1)) dut (.clk, .rst_n, .dp_i(bus_dp), .dm_i(bus_dm), .dp_o(d_dp), .dm_o(d_dm),
    .oe_n(d_oe_n), .switches, .leds, .bus_state, .dev_addr, .configured, .errors);

  // watchdog: about 4 ms of simulated time
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
