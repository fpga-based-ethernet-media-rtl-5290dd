// udp_arp_rx_tb: frames on the command port's byte stream (a byte every two
// clocks). Checks that the data of a UDP datagram to the tester's MAC, IP
// and port comes out in order framed by `udp_data_en`, that an ARP request
// for the tester's IP reports the requester's MAC and IP, and that
// datagrams to another port or IP, and ARP requests for another IP, are
// ignored. Also checks the received-command counter.
`timescale 1ns/1ps
module udp_arp_rx_tb;
  `include "tb_util.svh"
  logic clk = 0, rst = 1;
  logic [7:0] rx_byte = 0, udp_byte;
  logic rx_new_byte = 0, rx_frame = 0, rx_err = 0;
  logic [47:0] dev_mac = 48'h020000000001, arp_sha;
  logic [31:0] dev_ip = 32'hC0A8010A, arp_spa, udp_frames;
  logic [15:0] dev_port = 16'd12345;
  logic udp_new_byte, udp_data_en, arp_found;
  udp_arp_rx dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] got[$];
  int narp = 0, en_rises = 0;
  logic en_d = 0;
  always @(posedge clk) if (!rst) begin
    if (udp_new_byte && udp_data_en) got.push_back(udp_byte);
    if (arp_found) narp++;
    if (udp_data_en && !en_d) en_rises++;
    en_d <= udp_data_en;
  end
  task automatic send(input logic [7:0] f[$]);
    foreach (f[i]) begin
      @(negedge clk); rx_frame = 1; rx_new_byte = 1; rx_byte = f[i];
      @(negedge clk); rx_new_byte = 0;
    end
    @(negedge clk); rx_frame = 0;
    repeat (20) @(negedge clk);
  endtask
  initial begin
    logic [7:0] f[$], d[$];
    logic [47:0] pc = 48'h001122334455;
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 3; t++) begin
      rand_bytes(t == 0 ? 5 : $urandom_range(20, 120), d);
      make_udp(dev_mac, pc, 32'hC0A80102, dev_ip, 16'd5000, dev_port, d, f);
      got = {}; send(f);
      `CHECK(got == d, $sformatf("datagram %0d data (%0d bytes)", t, d.size()))
    end
    `CHECK(en_rises == 3 && udp_frames == 3, "three datagrams framed and counted")
    make_udp(dev_mac, pc, 32'hC0A80102, dev_ip, 16'd5000, 16'd999, d, f);
    got = {}; send(f);
    make_udp(dev_mac, pc, 32'hC0A80102, 32'hC0A80199, 16'd5000, dev_port, d, f);
    send(f);
    `CHECK(got.size() == 0 && en_rises == 3, "other port and IP ignored")
    make_arp_req(pc, 32'hC0A80102, dev_ip, f);
    send(f);
    `CHECK(narp == 1 && arp_sha == pc && arp_spa == 32'hC0A80102, "ARP request for the tester")
    make_arp_req(pc, 32'hC0A80102, 32'hC0A80177, f);
    send(f);
    `CHECK(narp == 1, "ARP request for another IP ignored")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
