// tb_util.svh: check counters, a check macro and a reference CRC-32 model
// shared by the testbenches. Included inside a testbench module.
//
// `CHECK(cond, msg) counts one check and, when `cond` is false, one failure
// with a message. ref_crc() is a bit-serial model of the Ethernet CRC-32
// (reflected polynomial 0xEDB88320, preset all ones, result complemented),
// written independently of the RTL's byte-wide version.
int checks = 0;
int failures = 0;

`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end

function automatic logic [31:0] ref_crc(input logic [7:0] d[$]);
  logic [31:0] c;
  c = 32'hFFFF_FFFF;
  foreach (d[i]) begin
    for (int b = 0; b < 8; b++) begin
      logic fb;
      fb = c[0] ^ d[i][b];
      c  = c >> 1;
      if (fb) c = c ^ 32'hEDB8_8320;
    end
  end
  return ~c;
endfunction

// Ethernet frame: destination, source, type, payload (padded to 46 bytes),
// then the FCS low byte first.
function automatic void make_frame(input logic [47:0] dst, input logic [47:0] src,
                                   input logic [15:0] typ, input logic [7:0] pl[$],
                                   output logic [7:0] f[$]);
  logic [31:0] c;
  f = {};
  for (int i = 5; i >= 0; i--) f.push_back(dst[8*i +: 8]);
  for (int i = 5; i >= 0; i--) f.push_back(src[8*i +: 8]);
  f.push_back(typ[15:8]); f.push_back(typ[7:0]);
  foreach (pl[i]) f.push_back(pl[i]);
  while (f.size() < 60) f.push_back(8'h00);
  c = ref_crc(f);
  for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
endfunction

function automatic void rand_bytes(input int n, output logic [7:0] q[$]);
  q = {};
  for (int i = 0; i < n; i++) q.push_back(8'($urandom));
endfunction

// Control command: "/ETHTEST/", test ID, '/', direction, '/', conditional
// MAC, '/', attribute bytes, then any frame bytes.
function automatic void make_cmd(input logic [7:0] id, input logic [7:0] dir,
                                 input logic [47:0] cond, input logic [7:0] at[$],
                                 input logic [7:0] fr[$], output logic [7:0] c[$]);
  string m = "/ETHTEST/";
  c = {};
  for (int i = 0; i < 9; i++) c.push_back(m[i]);
  c.push_back(id); c.push_back("/"); c.push_back(dir); c.push_back("/");
  for (int i = 5; i >= 0; i--) c.push_back(cond[8*i +: 8]);
  c.push_back("/");
  foreach (at[i]) c.push_back(at[i]);
  foreach (fr[i]) c.push_back(fr[i]);
endfunction

// ones' complement sum of a byte queue taken as 16-bit big-endian words
function automatic logic [15:0] ones_sum(input logic [7:0] q[$], input int from, input int n);
  logic [31:0] s = 0;
  for (int i = 0; i < n; i += 2) s += {q[from+i], (i + 1 < n) ? q[from+i+1] : 8'h00};
  while (s[31:16] != 0) s = {16'd0, s[15:0]} + {16'd0, s[31:16]};
  return s[15:0];
endfunction

// UDP/IPv4 frame with a correct IP header checksum and UDP checksum 0.
function automatic void make_udp(input logic [47:0] dmac, input logic [47:0] smac,
                                 input logic [31:0] sip, input logic [31:0] dip,
                                 input logic [15:0] sport, input logic [15:0] dport,
                                 input logic [7:0] data[$], output logic [7:0] f[$]);
  logic [7:0] p[$];
  logic [15:0] tl, ul, cs;
  tl = 16'(28 + data.size()); ul = 16'(8 + data.size());
  p = {8'h45, 8'h00, tl[15:8], tl[7:0], 8'h00, 8'h01, 8'h00, 8'h00, 8'h40, 8'h11, 8'h00, 8'h00,
       sip[31:24], sip[23:16], sip[15:8], sip[7:0], dip[31:24], dip[23:16], dip[15:8], dip[7:0],
       sport[15:8], sport[7:0], dport[15:8], dport[7:0], ul[15:8], ul[7:0], 8'h00, 8'h00};
  cs = ~ones_sum(p, 0, 20);
  p[10] = cs[15:8]; p[11] = cs[7:0];
  foreach (data[i]) p.push_back(data[i]);
  make_frame(dmac, smac, 16'h0800, p, f);
endfunction

// ARP request from (sha, spa) asking for tpa, broadcast.
function automatic void make_arp_req(input logic [47:0] sha, input logic [31:0] spa,
                                     input logic [31:0] tpa, output logic [7:0] f[$]);
  logic [7:0] p[$];
  p = {8'h00, 8'h01, 8'h08, 8'h00, 8'h06, 8'h04, 8'h00, 8'h01};
  for (int i = 5; i >= 0; i--) p.push_back(sha[8*i +: 8]);
  for (int i = 3; i >= 0; i--) p.push_back(spa[8*i +: 8]);
  for (int i = 0; i < 6; i++) p.push_back(8'h00);
  for (int i = 3; i >= 0; i--) p.push_back(tpa[8*i +: 8]);
  make_frame(48'hFFFFFFFFFFFF, sha, 16'h0806, p, f);
endfunction
