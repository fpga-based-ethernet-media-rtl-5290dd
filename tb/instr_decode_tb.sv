// instr_decode_tb: feeds UDP data streams as the receiver delivers them
// (`udp_data_en` over a datagram's data, a byte every two clocks) and checks
// the decoded result: the address-setting command and its six fields, a
// drop command with direction, conditional address and attribute, a
// direction-only command, a custom-frame command whose frame goes to the
// memory write port with the command issued at the end of the datagram, a
// denial-of-service command with attributes before the frame, and that a
// datagram without the main ID or with an unknown test ID does nothing.
`timescale 1ns/1ps
module instr_decode_tb;
  `include "tb_util.svh"
  import eth_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] udp_byte = 0;
  logic udp_new_byte = 0, udp_data_en = 0;
  logic cmd_valid, dir, dir_changed, init_valid, addr_valid;
  logic [7:0] cmd_test;
  logic [ATTR_W-1:0] cmd_attr;
  logic [47:0] cmd_dest, pc_mac, dev_mac;
  logic [31:0] dev_ip, pc_ip;
  logic [15:0] dev_port, pc_port;
  logic mem_active, mem_wr_enable, mem_wr_new_byte;
  logic [7:0] mem_wr_data;
  instr_decode dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int ncmd = 0, ninit = 0, ndir = 0;
  logic [7:0] memq[$];
  always @(posedge clk) if (!rst) begin
    if (cmd_valid) ncmd++;
    if (init_valid) ninit++;
    if (dir_changed) ndir++;
    if (mem_wr_new_byte) memq.push_back(mem_wr_data);
  end
  task automatic feed(input logic [7:0] d[$]);
    @(negedge clk); udp_data_en = 1;
    foreach (d[i]) begin
      @(negedge clk); udp_new_byte = 1; udp_byte = d[i];
      @(negedge clk); udp_new_byte = 0;
    end
    @(negedge clk); udp_data_en = 0;
    repeat (5) @(negedge clk);
  endtask
  initial begin
    logic [7:0] c[$], at[$], fr[$], none[$];
    repeat (3) @(negedge clk); rst = 0;
    `CHECK(!addr_valid && dir == 0, "reset state")
    // INIT: device IP, PC IP, device port, PC port, PC MAC, device MAC
    at = {8'd192, 8'd168, 8'd1, 8'd10, 8'd192, 8'd168, 8'd1, 8'd2, 8'h30, 8'h39, 8'h30, 8'h3A,
          8'h00, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01};
    c = {}; begin string m = "/ETHTEST/"; for (int i = 0; i < 9; i++) c.push_back(m[i]); end
    c.push_back(T_INIT); c.push_back("/"); c = {c, at};
    feed(c);
    `CHECK(ninit == 1 && addr_valid, "address setting taken")
    `CHECK(dev_ip == 32'hC0A8010A && pc_ip == 32'hC0A80102, "IP addresses")
    `CHECK(dev_port == 16'h3039 && pc_port == 16'h303A, "ports")
    `CHECK(pc_mac == 48'h001122334455 && dev_mac == 48'h020000000001, "MAC addresses")
    // drop, direction 2 -> 1, conditional address, amount 3
    make_cmd(T_DROP, DIR_2_TO_1, 48'hA1A2A3A4A5A6, '{8'd3}, none, c);
    feed(c);
    `CHECK(ncmd == 1 && cmd_test == T_DROP, "drop command")
    `CHECK(dir == 1 && ndir == 1, "direction 2 -> 1")
    `CHECK(cmd_dest == 48'hA1A2A3A4A5A6, "conditional address")
    `CHECK(cmd_attr[7:0] == 8'd3, "attribute byte")
    // direction only
    make_cmd(T_DIRECTION, DIR_1_TO_2, 48'h0, none, none, c);
    feed(c);
    `CHECK(dir == 0 && ndir == 2 && ncmd == 1, "direction-only command")
    // custom frame
    rand_bytes(80, fr); memq = {};
    make_cmd(T_CUSTOM, DIR_1_TO_2, 48'h0, none, fr, c);
    feed(c);
    `CHECK(memq == fr, "custom frame to memory")
    `CHECK(ncmd == 2 && cmd_test == T_CUSTOM, "custom command at datagram end")
    // denial of service: 2 attribute bytes, then the frame
    memq = {};
    make_cmd(T_DOS_BLOCK, DIR_1_TO_2, 48'h0, '{8'd0, 8'd5}, fr, c);
    feed(c);
    `CHECK(memq == fr && ncmd == 3 && cmd_test == T_DOS_BLOCK, "DoS command with frame")
    `CHECK(cmd_attr[15:0] == 16'h0500, "DoS attributes")
    // rubbish
    make_cmd(T_DROP, DIR_1_TO_2, 48'h0, '{8'd1}, none, c);
    c[7] = "X"; feed(c);
    make_cmd(8'd200, DIR_1_TO_2, 48'h0, '{8'd1}, none, c); feed(c);
    `CHECK(ncmd == 3, "bad main ID and unknown test ignored")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
