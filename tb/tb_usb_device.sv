// End-to-end testbench for usb_device at its default parameters (8-bit
// data bus between PHY and SIE). A host model drives the D+/D- line,
// resolved with the device's output enable, through a complete enumeration
// and use of the device; the sequence and its checks are in
// usb_device_test.svh, which also counts each protocol mechanism
// (NAK, STALL, zero-length packet, retry, duplicate, CRC error, no reply,
// reset, suspend, multi-packet transfer) and fails if one never happened.
module tb_usb_device;
  `include "tb/usb_device_test.svh"

  usb_device dut (.clk, .rst_n, .dp_i(bus_dp), .dm_i(bus_dm), .dp_o(d_dp), .dm_o(d_dm),
    .oe_n(d_oe_n), .switches, .leds, .bus_state, .dev_addr, .configured, .errors);

  // watchdog: about 4 ms of simulated time
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
