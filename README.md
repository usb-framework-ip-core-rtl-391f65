# A layered full-speed USB device core without a CPU

Most USB device controllers put registers and packet buffers between the
serial interface engine and the application, and expect a microcontroller to
answer the host's enumeration requests in software. This core does the
opposite: every layer, including the part of the protocol that answers
`GET_DESCRIPTOR`, `SET_ADDRESS` and friends, is plain hardware, and
endpoints hold no buffers. An application then only adds a few registers
behind an endpoint. The result is a small device that fits low-cost FPGAs
and needs nothing but a level-shifting driver (or, on the bench, a few
resistors) on D+/D-.

The architecture follows the layered USB core published by S. E. Tropea and
R. A. Melo (INTI, Argentina) in "USB framework, IP core and related
software". That publication gives the layer split, the block diagrams of the
PHY, SIE and endpoint/request framework, and the behaviour of each block in
prose. It does not give register-level details, so timing, encodings,
handshakes, the request set and the descriptor contents here are this
implementation's own choices. Each file's opening comment says which parts
follow the published description.

## Layers and where they live

| Layer | What it does | Modules |
|---|---|---|
| Electric | level conversion, external driver (e.g. ISP1106) | outside the chip: `dp_i/dm_i/dp_o/dm_o/oe_n` |
| PHY | UTMI-style transceiver: clock recovery, NRZI, bit stuffing, SYNC/EOP, 8- or 16-bit parallel interface | `usb_phy` = `phy_rx` + `phy_tx` |
| Handshake (SIE) | packet (dis)assembly, CRCs, transaction FSM, time-outs, reset/suspend | `usb_sie` = `sie_unpacker`, `sie_packer`, `sie_main_fsm`, `sie_turnaround`, `sie_timers`, `sie_bus_fsm`, `usb_crc5`, `usb_crc16`, `sie_utmi16` (16-bit bus only) |
| SIE adaptation | multiplexers only, no registers | `ep_mux` |
| Protocol | control endpoint with the common standard requests, pluggable request handlers, descriptor ROM | `ep0_base`, `req_mux`, `get_descriptor`, `desc_rom`, `usb_desc_pkg` |
| Endpoints and application | unbuffered endpoints and the user's function | `ep_generic`, `gpio_function` |
| Top | the demonstration device | `usb_device` |

Shared types (PIDs, the EP Status and EP Mode structs, the decoded SETUP
packet) are in `usb_pkg`.

The demonstration device `usb_device` is a full-speed "GPIO" device: a
host write to EP1 OUT sets eight LEDs, and EP1 IN reports eight switches
whenever they change. It enumerates as one configuration with a
vendor-specific interface (VID 0x1209, PID 0x0001).

## Clocking

Everything runs on one 48 MHz clock. The PHY samples the line four times per
12 Mb/s bit. A low-speed build (`LOW_SPEED=1` on the PHY, SIE and time-out)
swaps the J/K polarity and expects a 6 MHz clock, again four samples per
bit. The SIE runs on the same clock as the PHY.

## PHY: from the wire to bytes

**Receive (`phy_rx`).** D+ and D- pass through a two-flop synchroniser. The
"DPLL" is a 2-bit phase counter that restarts on every line transition; a
bit is sampled two clocks after the last transition, mid-bit. Because USB
guarantees a transition at least every seven bits (bit stuffing), this
tracks the host's clock drift without a real PLL. A transition that arrives
exactly at the sampling point means the phase is off by half a bit and is
flagged as `err_sync`. The sampled pair is decoded to a level (1 = J) and
an SE0 flag. NRZI decoding turns "no change" into 1 and "change" into 0.

The receive FSM is idle until it sees a K. It then counts SYNC zeros and
accepts the packet when a 1 follows at least four of them, raising
`rx_active`. From then on it removes the 0 stuffed after six 1s. A seventh 1
is a stuffing error: `rx_error` and `err_stuff` pulse, `rx_active` drops
and the FSM waits for the EOP. Bits are shifted in LSB first and
`rx_valid` pulses with `rx_data` once per byte, about every 32 clocks. SE0
followed by J is the EOP; if it does not fall on a byte boundary,
`rx_error` and `err_align` pulse as `rx_active` drops.

**Transmit (`phy_tx`).** The SIE holds `tx_valid` high with the PID byte.
A byte moves into the one-byte input register on every clock edge where
`tx_valid && tx_ready`. The FSM pulls `oe_n` low, shifts out SYNC
(`0x80`, LSB first) and then the bytes, one bit every four clocks. It
inserts a 0 after six 1s (the count starts within SYNC), NRZI-encodes and
drives the differential pair. When the input register is empty at a byte
boundary and `tx_valid` is low, it sends EOP (two bit times SE0, one bit
time J) and releases `oe_n`. The receiver is blanked while the transmitter
owns the line.

**16-bit data bus (`DATA16=1`).** UTMI also defines a 16-bit bus, and both
PHY halves offer it. On receive, the first byte of each pair is held. When
the second byte completes, `rx_valid` and `rx_valid_h` pulse together,
with the bytes on `rx_data` (first) and `rx_data_h`. An odd last byte
comes with `rx_valid` alone, as soon as the EOP's SE0 appears and while
`rx_active` is still high. On transmit, a word is taken when `tx_valid`
and `tx_ready` are high. `tx_data_h` follows `tx_data` on the line only if
`tx_valid_h` is high, so an odd-length packet ends with `tx_valid_h` low.
Words move about every 64 clocks. With `DATA16=0` the high-byte signals are
idle or ignored.

## SIE: transactions

**Unpacker.** The first byte is the PID; its high nibble must be the
complement of the low one. Tokens (IN, OUT, SETUP) must be exactly three
bytes with a correct CRC5 over address and endpoint. Data packets
(DATA0/1) must end in a CRC16 that leaves the USB residual. Handshakes
(ACK, NAK, STALL) must be one byte. Other PIDs, SOF included, are silently
dropped. Payload bytes go out two bytes late (`d_valid`), so the CRC bytes
never reach an endpoint. When `rx_active` falls, `got_pk` pulses with
the PID, address, endpoint and an error flag. Separate strobes tell CRC,
PID and incomplete-packet errors apart.

**Main FSM.** A good token for this device's address is put on the token
bus (`tok_valid`, `tok_ep`, `tok_pid`). One clock later the FSM reads the
selected endpoint's status and mode through `ep_mux` and picks the reply:

| Token | Endpoint state | Reply |
|---|---|---|
| any | token not in the endpoint's EP Mode | none (host times out) |
| IN | stalled / not ready / ready | STALL / NAK / DATA*t* with *t* = endpoint toggle, then wait for ACK |
| OUT + DATA*x* | stalled / not ready | STALL / NAK |
| OUT + DATA*x* | ready, *x* = toggle | ACK, `rx_ok` (endpoint commits, advances toggle) |
| OUT + DATA*x* | ready, *x* ≠ toggle (retry of a packet whose ACK was lost) | ACK, data dropped |
| SETUP + DATA0 | always | `stall_clr`, ACK, `rx_ok` |
| corrupted packet | | none |

While waiting for the host's data packet or ACK, the bus turn-around
time-out (`sie_turnaround`) counts idle-J time and gives up after 18 bit
times. An IN whose ACK never comes is therefore simply repeated by the host
with the same toggle, because `in_ok` was never sent.

**Packer.** It sends a PID alone (handshakes) or a PID, `tx_len` payload
bytes and the CRC16, low byte first. It does not buffer the payload: it
drives the byte index `ep_tx_idx`, and the endpoint must put that byte on
`ep_tx_data` within a few clocks. One clock of ROM latency is fine,
because the PHY takes a new byte only every 32 clocks.

**16-bit UTMI port.** The packer and unpacker always work a byte at a
time. With `DATA16=1`, `sie_utmi16` sits between them and the PHY. It
replays each received word as two bytes on consecutive clocks. On
transmit it gathers two bytes into a word, taking at most one byte every 8
clocks so that slow endpoint data can settle. A packet that ends with one
byte gathered is sent as a final half word. Its TxValid toward the PHY is
low while a word is being gathered. That is harmless here, because
`phy_tx` checks its input register only at byte boundaries, but a
third-party UTMI PHY may expect TxValid to stay high for the whole packet.

**Bus state.** `sie_timers` is one counter restarted whenever the line
changes between SE0, J and anything else. It provides 2.5 µs, 100 µs, 1 ms
and 3 ms flags. `sie_bus_fsm` declares a bus reset after 2.5 µs of SE0
(`usb_rst`, which clears the address, the configuration and the toggles)
and suspend after 3 ms of J; any activity resumes. The 100 µs and 1 ms
flags exist for high-speed negotiation, which this full-speed build does
not perform.

## The endpoint bus (the part to understand before adding endpoints)

There are no FIFOs between the SIE and the endpoints. `ep_mux` broadcasts
the SIE's outputs to every endpoint, gives each one a select bit
(`ep_sel[i]` = the current token's endpoint number is *i*), and routes the
selected endpoint's signals back:

| Signal | Direction | Meaning |
|---|---|---|
| `tok_valid`, `tok_pid`, `tok_ep` | SIE → all | a token for this device arrived; direction is `tok_pid` |
| `ep_status` {stall, ready, toggle} | EP → SIE | for the current token's direction: halted? data/room available? expected/next DATA0/1 |
| `ep_mode` {in_en, out_en, setup_en} | EP → SIE | which tokens the endpoint answers at all |
| `ep_rx_valid`, `ep_rx_data` | SIE → all | payload bytes of an OUT/SETUP packet the SIE will accept |
| `rx_ok` | SIE → all | that packet was good and ACKed: commit it, flip the OUT toggle |
| `ep_tx_len`, `ep_tx_idx`, `ep_tx_data` | both | IN payload: length from EP, byte index from SIE, byte from EP |
| `in_ok` | SIE → all | the host ACKed our IN data: advance data and IN toggle |
| `stall_clr` | SIE → all | SETUP arrived: leave STALL |

An endpoint must qualify every strobe with its select bit. Payload bytes
arrive before the SIE knows whether the CRC is right. An endpoint that acts
on data must therefore stage it and act only on `rx_ok`, as
`gpio_function` does with its LED byte.

`ep_generic` is the reusable unbuffered endpoint. It keeps both toggles and
the halt bit and answers only once the device is configured. It passes
everything else through to its function (`fn_in_*`, `fn_out_*`). Adding an
endpoint means adding an `ep_generic` plus a function, widening `ep_mux`'s
`NUM_EP`, and adding its descriptor to the ROM.

## EP0: control transfers in hardware

`ep0_base` collects the 8 SETUP bytes and latches them when `rx_ok`
confirms the packet. It then decodes the request once:

* handled here: `SET_ADDRESS` (applied only after the status stage, as USB
  requires), `SET_CONFIGURATION` 0/1 (resets endpoint toggles),
  `GET_CONFIGURATION`, `GET_STATUS` (endpoint halt bit),
  `SET/CLEAR_FEATURE(ENDPOINT_HALT)`. Device features are accepted and
  ignored.
* anything else is offered to the request handlers through `req_mux`.
  The lowest-numbered handler that claims the request supplies its length
  and its bytes by offset (`rd_addr`), and sees `h_done` at the end of the
  status stage. `get_descriptor` is the one handler built here. It serves
  the device descriptor, the configuration descriptor (with interface and
  endpoint descriptors) and strings 0 and 1 from `desc_rom`, using the
  addresses in `usb_desc_pkg`.
* unclaimed requests, and host-to-device requests with a data stage, get
  STALL on both directions until the next SETUP.

The IN data stage sends `min(wLength, length)` bytes in 8-byte packets
(`MPS`), starting with DATA1. It ends with a short packet, or with a
zero-length packet when the data end on a packet boundary below `wLength`.
The status stage is a zero-length DATA1 in the other direction. A host that
cuts the data stage short with an OUT is accepted.

## Parameters

| Module | Parameter | Default | Note |
|---|---|---|---|
| `usb_device`, `usb_sie`, `sie_timers` | `CLK_HZ` | 48 000 000 | all timers derive from it |
| `usb_device` | `EP0_MPS` | 8 | EP0 max packet size; the device descriptor says 8 too |
| `usb_device`, `usb_phy`, `phy_rx`, `phy_tx`, `usb_sie` | `DATA16` | 0 | 1 = 16-bit UTMI data bus between PHY and SIE |
| `usb_phy`, `phy_rx`, `phy_tx`, `usb_sie`, `sie_turnaround`, `sie_bus_fsm` | `LOW_SPEED` | 0 | 1 = low speed polarity (6 MHz clock) |
| `sie_turnaround` | `TIMEOUT_BITS`, `CLKS_PER_BIT` | 18, 4 | USB allows 16–18 bit times |
| `ep_mux` | `NUM_EP` | 2 | |
| `req_mux` | `N` | 1 | number of request handlers |
| `ep_generic` | `IN_EN`, `OUT_EN` | 1, 1 | directions supported |

`usb_pkg::LEN_W` = 7 limits packets to 64 bytes.

## Differences from the published core

* Both UTMI data bus widths are implemented, but the SIE always runs on
  the PHY clock. The published core can also clock the SIE at half the PHY
  clock, which is not offered here. The 16-bit bus is adapted to the
  byte-wide packet logic at the SIE's edge (`sie_utmi16`), not carried
  through the packer and unpacker.
* No high-speed support. The published core can drive an external
  high-speed UTMI PHY and negotiates FS→HS during reset. Here the
  reset/suspend FSM only detects reset and suspend.
* The demonstration application is a vendor-class GPIO device. The
  published demonstrators (HID joystick, generic HID, generic device with a
  bulk endpoint reading the descriptor ROM, USB-to-WISHBONE bridge) are not
  reproduced. Their descriptors, HID reports and bridge protocol are not
  specified there.
* The set of requests handled in EP0 Base, the STALL policy, the
  descriptor contents and every timing detail are this implementation's
  choices.
* The published core was written in VHDL-93 and its descriptor ROM and
  address package were generated by a tool. Here the ROM contents are
  written out in `desc_rom.sv`: 64 bytes, whose layout is in its header.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. The
host side of the line is modelled by `tb/usb_host_tasks.svh`. It builds
packets bit by bit (SYNC, stuffing, NRZI, EOP), decodes the device's
packets, and computes CRC5/CRC16 with the textbook bit-serial definitions,
independently of the RTL. It can also inject stuffing and alignment errors.
The CRC testbenches also check published reference values (the `SETUP`
token `2D 00 10` and the CRC-16/USB check value `0xB4C8`).

`tb_usb_device` runs the whole device at its default parameters:

1. bus reset
2. enumeration: device, configuration and string descriptors, with and
   without a trailing zero-length packet
3. `SET_ADDRESS`, `SET_CONFIGURATION`, `GET_CONFIGURATION`
4. an unsupported request (STALL)
5. EP1 IN reports, including NAK when nothing changed and a lost ACK
   followed by a retry with the same toggle
6. EP1 OUT to the LEDs, including a duplicate packet that must be dropped
7. endpoint halt set, read back with `GET_STATUS`, and cleared
8. a token with a bad CRC, which must get no reply
9. a token for a stale address
10. 3 ms of idle, which must suspend the device, then resume

It counts each of these mechanisms and fails if any never happened. It
simulates about 4 ms of bus time in well under a second.
`tb_usb_device16` runs the same sequence, from `tb/usb_device_test.svh`,
on a device built with `DATA16=1`. The PHY testbenches also check the
16-bit mode on its own, including odd-length packets.

To run one testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -I. -y rtl \
  --top-module tb_usb_device rtl/usb_pkg.sv rtl/usb_desc_pkg.sv tb/tb_usb_device.sv
./obj_dir/Vtb_usb_device
```

Replace `tb_usb_device` with any other `tb_<module>`. The testbenches
include `tb/usb_host_tasks.svh` and `tb/tb_check.svh` by that path, so run
from the parent of `tb/`.

`tb_usb_phy` also sends a packet between two PHYs built with
`LOW_SPEED=1`. Every testbench resets the design and passes when all
other state starts at random values (`+verilator+rand+reset+2`).

What has not been verified: operation against a real host or real line
drivers, the SIE and EP0 at low speed (only the PHY is simulated there),
and timing closure on any FPGA.

## Size

A generic synthesis of `usb_device` at its defaults (8-bit bus), not mapped
to any FPGA, gives about 490 flip-flops, a 512-bit ROM and roughly 1,070
word-level cells. The
published core reports around 600–700 LUTs and 350–430 flip-flops for
comparable demonstrators on Spartan-II/3. No FPGA mapping was done here, so
the two are not directly comparable.
