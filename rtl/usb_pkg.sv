// Shared types and constants of the USB full-speed device.
// PID codes and request numbers are the USB 2.0 ones. The endpoint status and
// mode structs are the "EP Status" and "EP Mode" buses between the SIE and the
// endpoints: status says whether the endpoint is available, stalled or not yet
// ready and which data toggle (DATA0/1) it expects or sends; mode says which
// tokens (IN, OUT, SETUP) the endpoint accepts.
package usb_pkg;
  typedef enum logic [3:0] {
    PID_OUT   = 4'b0001,
    PID_IN    = 4'b1001,
    PID_SOF   = 4'b0101,
    PID_SETUP = 4'b1101,
    PID_DATA0 = 4'b0011,
    PID_DATA1 = 4'b1011,
    PID_ACK   = 4'b0010,
    PID_NAK   = 4'b1010,
    PID_STALL = 4'b1110,
    PID_NYET  = 4'b0110
  } pid_t;

  // Bus state reported by the reset/suspend FSM ("Bus Status").
  typedef enum logic [1:0] {
    BUS_IDLE    = 2'd0,
    BUS_RESET   = 2'd1,
    BUS_ACTIVE  = 2'd2,
    BUS_SUSPEND = 2'd3
  } bus_state_t;

  // "EP Status": stall, ready (IN: data available, OUT: room available),
  // toggle (0 = DATA0, 1 = DATA1) for the direction of the current token.
  typedef struct packed {
    logic stall;
    logic ready;
    logic toggle;
  } ep_status_t;

  // "EP Mode": which tokens the endpoint supports.
  typedef struct packed {
    logic in_en;
    logic out_en;
    logic setup_en;
  } ep_mode_t;

  // Packet length / byte index width: up to 64-byte packets.
  localparam int unsigned LEN_W = 7;

  // Standard request codes (bRequest).
  localparam logic [7:0] REQ_GET_STATUS        = 8'd0;
  localparam logic [7:0] REQ_CLEAR_FEATURE     = 8'd1;
  localparam logic [7:0] REQ_SET_FEATURE       = 8'd3;
  localparam logic [7:0] REQ_SET_ADDRESS       = 8'd5;
  localparam logic [7:0] REQ_GET_DESCRIPTOR    = 8'd6;
  localparam logic [7:0] REQ_GET_CONFIGURATION = 8'd8;
  localparam logic [7:0] REQ_SET_CONFIGURATION = 8'd9;

  // Decoded SETUP packet.
  typedef struct packed {
    logic [15:0] wLength;
    logic [15:0] wIndex;
    logic [15:0] wValue;
    logic [7:0]  bRequest;
    logic [7:0]  bmRequestType;
  } setup_t;
endpackage
