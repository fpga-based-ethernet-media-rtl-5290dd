// udp_arp_tx_tb: sets the addresses, then asks for an ARP reply and for UDP
// datagrams of 5 and 100 bytes. Each transmitted frame is compared byte for
// byte with one built independently here (ARP reply fields, padding to 60
// bytes, IPv4 header with a checksum whose ones' complement sum is 0xFFFF,
// UDP length, payload, FCS). Also checks that nothing starts while
// `tx_allowed` is low and that bytes come every other clock.
`timescale 1ns/1ps
module udp_arp_tx_tb;
  `include "tb_util.svh"
  logic clk = 0, rst = 1;
  logic init_valid = 0, arp_found = 0, udp_req = 0, tx_allowed = 0;
  logic [31:0] dev_ip = 32'hC0A8010A, pc_ip = 32'hC0A80102, arp_spa = 32'hC0A80105;
  logic [15:0] dev_port = 16'd12345, pc_port = 16'd5000;
  logic [47:0] pc_mac = 48'h001122334455, dev_mac = 48'h020000000001, arp_sha = 48'h0A0B0C0D0E0F;
  logic [10:0] udp_len = 0;
  logic [7:0] udp_data, wr_byte;
  logic udp_pull, wr_en, wr_last, busy, arp_sent, udp_sent;
  udp_arp_tx dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] payload[$];
  int pi = 0;
  assign udp_data = (pi < payload.size()) ? payload[pi] : 8'h00;
  always @(posedge clk) if (udp_pull) pi++;
  logic [7:0] got[$];
  int nlast = 0, min_sp = 99, since = 99;
  always @(posedge clk) if (!rst) begin
    since++;
    if (wr_en) begin
      got.push_back(wr_byte);
      if (since < min_sp && got.size() <= 60) min_sp = since;
      since = 0;
      if (wr_last) nlast++;
    end
  end
  initial begin
    logic [7:0] e[$], p[$];
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk); init_valid = 1; @(negedge clk); init_valid = 0;
    repeat (60) @(negedge clk);
    // ARP reply
    @(negedge clk); arp_found = 1; @(negedge clk); arp_found = 0;
    repeat (20) @(negedge clk);
    `CHECK(got.size() == 0 && !busy, "held while not allowed")
    tx_allowed = 1;
    wait (nlast == 1); repeat (3) @(negedge clk);
    p = {8'h00, 8'h01, 8'h08, 8'h00, 8'h06, 8'h04, 8'h00, 8'h02};
    for (int i = 5; i >= 0; i--) p.push_back(dev_mac[8*i +: 8]);
    for (int i = 3; i >= 0; i--) p.push_back(dev_ip[8*i +: 8]);
    for (int i = 5; i >= 0; i--) p.push_back(arp_sha[8*i +: 8]);
    for (int i = 3; i >= 0; i--) p.push_back(arp_spa[8*i +: 8]);
    make_frame(arp_sha, dev_mac, 16'h0806, p, e);
    `CHECK(got == e, "ARP reply")
    `CHECK(min_sp == 2, "one byte every two clocks")
    // UDP datagrams
    for (int t = 0; t < 2; t++) begin
      rand_bytes(t == 0 ? 5 : 100, payload); pi = 0;
      got = {};
      @(negedge clk); udp_req = 1; udp_len = 11'(payload.size()); @(negedge clk); udp_req = 0;
      wait (nlast == 2 + t); repeat (3) @(negedge clk);
      make_udp(pc_mac, dev_mac, dev_ip, pc_ip, dev_port, pc_port, payload, e);
      e[18] = 8'h00; e[19] = 8'h00;  // identification 0 in the tester's header
      begin
        logic [15:0] cs;
        e[24] = 0; e[25] = 0;
        cs = ~ones_sum(e, 14, 20); e[24] = cs[15:8]; e[25] = cs[7:0];
        e = e[0:e.size()-5];
        cs = 0;
        begin logic [31:0] c; c = ref_crc(e); for (int i = 0; i < 4; i++) e.push_back(c[8*i +: 8]); end
      end
      `CHECK(got == e, $sformatf("UDP datagram of %0d bytes", payload.size()))
      `CHECK(got.size() > 34 && ones_sum(got, 14, 20) == 16'hFFFF, "IP header checksum")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
