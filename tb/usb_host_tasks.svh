// Host-side bus functional model for the testbenches, included inside a
// testbench module. The including module must declare:
//   logic clk; logic h_dp, h_dm;            (line driven by the host, FS)
//   logic d_dp, d_dm, d_oe_n;               (line driven by the device)
// Bits last 4 clocks (48 MHz clock, 12 Mb/s). CRCs are computed here with
// the textbook bit-serial USB definitions, independently of the RTL.

function automatic logic [4:0] h_crc5(input logic [10:0] v);
  logic [4:0] c = 5'h1f;
  for (int i = 0; i < 11; i++) c = (c[0] ^ v[i]) ? ((c >> 1) ^ 5'h14) : (c >> 1);
  return ~c;
endfunction

function automatic logic [15:0] h_crc16(input logic [7:0] b[], input int n);
  logic [15:0] c = 16'hffff;
  for (int k = 0; k < n; k++)
    for (int i = 0; i < 8; i++)
      c = (c[0] ^ b[k][i]) ? ((c >> 1) ^ 16'hA001) : (c >> 1);
  return ~c;
endfunction

// Drive one bit time of a line level (1 = J) or SE0.
task automatic h_drive(input logic lvl, input logic se0);
  h_dp = se0 ? 1'b0 : lvl;
  h_dm = se0 ? 1'b0 : !lvl;
  repeat (4) @(posedge clk);
endtask

// Send raw bytes (PID first) as one packet: SYNC, stuffing, NRZI, EOP.
// stuff_err forces seven 1s without a stuffed bit at the first chance,
// drop_bits removes bits before the EOP (alignment error).
task automatic h_send(input logic [7:0] b[], input int n,
                      input bit stuff_err = 0, input int drop_bits = 0);
  logic lvl = 1'b1;
  int ones = 0;
  logic bits[$];
  bit forced = 0;
  for (int i = 0; i < 7; i++) bits.push_back(1'b0);
  bits.push_back(1'b1);
  for (int k = 0; k < n; k++) for (int i = 0; i < 8; i++) bits.push_back(b[k][i]);
  repeat (drop_bits) void'(bits.pop_back());
  foreach (bits[i]) begin
    if (!bits[i]) lvl = !lvl;
    h_drive(lvl, 0);
    ones = bits[i] ? ones + 1 : 0;
    if (ones == 6) begin
      if (stuff_err && !forced) begin forced = 1; h_drive(lvl, 0); end
      else begin lvl = !lvl; h_drive(lvl, 0); end
      ones = 0;
    end
  end
  h_drive(1, 1); h_drive(1, 1); h_drive(1, 0);
  h_dp = 1'b1; h_dm = 1'b0;
endtask

task automatic h_token(input logic [3:0] pid, input logic [6:0] addr, input logic [3:0] ep);
  logic [7:0] b[] = new[3];
  logic [10:0] f = {ep, addr};
  logic [4:0] c = h_crc5(f);
  b[0] = {~pid, pid};
  b[1] = f[7:0];
  b[2] = {c, f[10:8]};
  h_send(b, 3);
endtask

task automatic h_data(input logic [3:0] pid, input logic [7:0] d[], input int n);
  logic [7:0] b[] = new[n + 3];
  logic [15:0] c = h_crc16(d, n);
  b[0] = {~pid, pid};
  for (int i = 0; i < n; i++) b[i + 1] = d[i];
  b[n + 1] = c[7:0];
  b[n + 2] = c[15:8];
  h_send(b, n + 3);
endtask

task automatic h_handshake(input logic [3:0] pid);
  logic [7:0] b[] = new[1];
  b[0] = {~pid, pid};
  h_send(b, 1);
endtask

// Receive one packet from the device. n = -1 on time-out (no packet),
// n = -2 on an EOP that is not on a byte boundary.
task automatic h_recv(output logic [7:0] b[$], output int n, input int timeout = 400);
  int t = 0;
  logic prev, cur;
  int ones = 0, nb = 0;
  logic [7:0] sh = '0;
  b.delete();
  while (!( !d_oe_n && !d_dp && d_dm) && t < timeout) begin @(posedge clk); t++; end
  if (t >= timeout) begin n = -1; return; end
  // first K seen: sample in the middle of each bit from here
  repeat (2) @(posedge clk);
  prev = 1'b1;
  // skip SYNC: wait for the two consecutive K bits
  forever begin
    cur = d_dp;
    repeat (4) @(posedge clk);
    if (cur == prev && cur == 1'b0) break;
    prev = cur;
  end
  prev = 1'b0; ones = 1;
  forever begin
    if (!d_dp && !d_dm) break;
    cur = d_dp;
    if (ones == 6) begin ones = 0; prev = cur; end
    else begin
      logic bv = (cur == prev);
      prev = cur;
      ones = bv ? ones + 1 : 0;
      sh = {bv, sh[7:1]};
      nb++;
      if (nb % 8 == 0) b.push_back(sh);
    end
    repeat (4) @(posedge clk);
  end
  n = (nb % 8 == 0) ? b.size() : -2;
  repeat (12) @(posedge clk);
endtask
