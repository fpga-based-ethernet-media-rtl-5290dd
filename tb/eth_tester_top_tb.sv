// eth_tester_top_tb: end-to-end run of the whole tester at its default
// parameters (25 MHz core clock, 2**26-word memory), with MII PHY models on
// all four ports and a DDR2 model on the memory port.
//
// The control PC on port 3 first sets the addresses with a broadcast
// address-setting command, resolves the tester's MAC with ARP, and then
// sends one command per test in UDP datagrams to the tester's IP and port.
// After each command, frames are sent into port 1 (or port 2 after the
// direction change) and the frames leaving the other port are compared with
// frames built here from the command's meaning: replaced addresses, type and
// payload with a correct new FCS, a replaced FCS, an inverted bit, a dropped
// frame, a shortened preamble without SFD, swapped and delayed order, two
// frames sent with a 12-nibble gap (measured on the wire), a
// custom frame, and a stream of DoS copies. Ports 3 and 4 are checked to
// carry the transmitted and received copies of the direction under test.
// Each mechanism is counted and the run fails if one never happened.
`timescale 1ns/1ps
module eth_tester_top_tb;
  `include "tb_util.svh"
  import eth_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] rx_clk = 0, rx_dv, rx_er;
  logic [3:0] rxd [3];
  logic [3:0] tx_clk = 0;
  logic [3:0] txd [4];
  logic [3:0] tx_en, tx_er;
  logic mem_wr_cmd_en, mem_rd_cmd_en, mem_rd_data_valid;
  logic [25:0] mem_wr_addr, mem_rd_addr;
  logic [31:0] mem_wr_data, mem_rd_data, cmd_frames;
  logic dir, addr_valid;
  logic [1:0] test_active;
  logic [31:0] frames_out [2];
  eth_tester_top dut (.*);
  ddr2_mem_model #(.AW(26)) u_mem (.clk, .wr_cmd_en(mem_wr_cmd_en), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .rd_cmd_en(mem_rd_cmd_en), .rd_addr(mem_rd_addr),
    .rd_data_valid(mem_rd_data_valid), .rd_data(mem_rd_data));
  // core clock slightly faster than the 25 MHz port clocks
  always #19.9 clk = ~clk;
  always #20 rx_clk[0] = ~rx_clk[0];
  always #20.001 rx_clk[1] = ~rx_clk[1];
  always #19.999 rx_clk[2] = ~rx_clk[2];
  always #20 tx_clk[0] = ~tx_clk[0];
  always #20.002 tx_clk[1] = ~tx_clk[1];
  always #19.998 tx_clk[2] = ~tx_clk[2];
  always #20.001 tx_clk[3] = ~tx_clk[3];
  mii_source src1 (.clk(rx_clk[0]), .dv(rx_dv[0]), .er(rx_er[0]), .d(rxd[0]));
  mii_source src2 (.clk(rx_clk[1]), .dv(rx_dv[1]), .er(rx_er[1]), .d(rxd[1]));
  mii_source src3 (.clk(rx_clk[2]), .dv(rx_dv[2]), .er(rx_er[2]), .d(rxd[2]));
  mii_sink snk1 (.clk(tx_clk[0]), .rst, .en(tx_en[0]), .er(tx_er[0]), .d(txd[0]));
  mii_sink snk2 (.clk(tx_clk[1]), .rst, .en(tx_en[1]), .er(tx_er[1]), .d(txd[1]));
  mii_sink snk3 (.clk(tx_clk[2]), .rst, .en(tx_en[2]), .er(tx_er[2]), .d(txd[2]));
  mii_sink snk4 (.clk(tx_clk[3]), .rst, .en(tx_en[3]), .er(tx_er[3]), .d(txd[3]));

  initial begin : watchdog
    #60ms;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // addresses
  localparam logic [47:0] PC_MAC = 48'h001122334455, DEV_MAC = 48'h02AB00000001;
  localparam logic [31:0] PC_IP = 32'hC0A80102, DEV_IP = 32'hC0A8010A;
  localparam logic [15:0] PC_PORT = 16'd5000, DEV_PORT = 16'd12345;
  localparam logic [47:0] HOST_A = 48'h0A0000000001, HOST_B = 48'h0A0000000002;

  // mechanism counters
  typedef enum int {M_INIT, M_ARP, M_FWD12, M_FWD21, M_MON3, M_MON4, M_DST, M_SRC, M_TYPE,
                    M_PAYLOAD, M_FCS, M_DROP, M_INVERT, M_PREAMBLE, M_SWAP, M_DELAY_N,
                    M_DELAY_ALL, M_IPG, M_CUSTOM, M_DOS_BLOCK, M_DOS_ALLOW, M_DIRECTION, M_MEMORY,
                    M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"init", "arp", "fwd12", "fwd21", "mon3", "mon4", "dst", "src",
    "type", "payload", "fcs", "drop", "invert", "preamble", "swap", "delay_n", "delay_all",
    "ipg", "custom", "dos_block", "dos_allow", "direction", "memory"};

  function automatic bit fcs_ok(input logic [7:0] f[$]);
    logic [7:0] b[$];
    logic [31:0] c;
    if (f.size() < 5) return 0;
    b = f[0:f.size()-5];
    c = ref_crc(b);
    return {f[f.size()-1], f[f.size()-2], f[f.size()-3], f[f.size()-4]} == c;
  endfunction

  task automatic wait_count(ref int cnt, input int n, input int max_us);
    int g = 0;
    while (cnt < n && g < max_us * 25) begin @(posedge clk); g++; end
  endtask

  task automatic command(input logic [7:0] id, input logic [7:0] d, input logic [47:0] cond,
                         input logic [7:0] at[$], input logic [7:0] fr[$]);
    logic [7:0] c[$], f[$];
    make_cmd(id, d, cond, at, fr, c);
    make_udp(DEV_MAC, PC_MAC, PC_IP, DEV_IP, PC_PORT, DEV_PORT, c, f);
    src3.send(f);
    repeat (300) @(posedge clk);
  endtask

  // send on port 1 (or 2) and return the frame that leaves port 2 (or 1)
  task automatic through(input int p, input logic [7:0] f[$], output logic [7:0] o[$],
                         output bit got);
    int n;
    n = (p == 1) ? snk2.count : snk1.count;
    if (p == 1) src1.send(f); else src2.send(f);
    if (p == 1) wait_count(snk2.count, n + 1, 200); else wait_count(snk1.count, n + 1, 200);
    got = (p == 1) ? snk2.count > n : snk1.count > n;
    o = {};
    if (got) o = (p == 1) ? snk2.frames[n] : snk1.frames[n];
  endtask

  initial begin
    logic [7:0] f[$], g[$], h[$], o[$], pl[$], e[$], at[$], none[$], c[$];
    bit got;
    int n2, n3, n4;
    rx_dv = '0; rx_er = '0;
    foreach (mech[i]) mech[i] = 0;
    #500 rst = 0;
    #500;
    // ---- address setting (broadcast) ----
    at = {DEV_IP[31:24], DEV_IP[23:16], DEV_IP[15:8], DEV_IP[7:0],
          PC_IP[31:24], PC_IP[23:16], PC_IP[15:8], PC_IP[7:0],
          DEV_PORT[15:8], DEV_PORT[7:0], PC_PORT[15:8], PC_PORT[7:0]};
    for (int i = 5; i >= 0; i--) at.push_back(PC_MAC[8*i +: 8]);
    for (int i = 5; i >= 0; i--) at.push_back(DEV_MAC[8*i +: 8]);
    begin
      string m = "/ETHTEST/";
      c = {};
      for (int i = 0; i < 9; i++) c.push_back(m[i]);
    end
    c.push_back(T_INIT); c.push_back("/"); c = {c, at};
    make_udp(48'hFFFFFFFFFFFF, PC_MAC, PC_IP, 32'hFFFFFFFF, PC_PORT, 16'd9, c, f);
    src3.send(f);
    repeat (200) @(posedge clk);
    `CHECK(addr_valid, "addresses set")
    if (addr_valid) mech[M_INIT]++;
    // ---- ARP ----
    n3 = snk3.count;
    make_arp_req(PC_MAC, PC_IP, DEV_IP, f);
    src3.send(f);
    wait_count(snk3.count, n3 + 1, 100);
    if (snk3.count > n3) begin
      o = snk3.frames[n3];
      `CHECK(o.size() == 64 && fcs_ok(o), "ARP reply length and FCS")
      `CHECK(o[12] == 8'h08 && o[13] == 8'h06 && o[21] == 8'h02, "ARP reply type and operation")
      `CHECK({o[22], o[23], o[24], o[25], o[26], o[27]} == DEV_MAC &&
             {o[28], o[29], o[30], o[31]} == DEV_IP, "ARP reply sender")
      `CHECK({o[0], o[1], o[2], o[3], o[4], o[5]} == PC_MAC, "ARP reply to the requester")
      if (fcs_ok(o)) mech[M_ARP]++;
    end
    // ---- plain forwarding and monitors ----
    rand_bytes(100, pl); make_frame(HOST_B, HOST_A, 16'h0800, pl, f);
    n3 = snk3.count; n4 = snk4.count;
    through(1, f, o, got);
    `CHECK(got && o == f, "frame forwarded 1 -> 2")
    if (got && o == f) mech[M_FWD12]++;
    `CHECK(snk2.pre_len[snk2.count-1] == 15 && snk2.sfd_seen[snk2.count-1], "standard preamble")
    repeat (2000) @(posedge clk);
    if (snk3.count > n3 && snk3.frames[n3] == f) mech[M_MON3]++;
    if (snk4.count > n4 && snk4.frames[n4] == f) mech[M_MON4]++;
    `CHECK(mech[M_MON3] == 1 && mech[M_MON4] == 1, "monitor copies on ports 3 and 4")
    make_frame(HOST_A, HOST_B, 16'h0800, pl, g);
    n4 = snk4.count;
    through(2, g, o, got);
    `CHECK(got && o == g, "frame forwarded 2 -> 1")
    if (got && o == g) mech[M_FWD21]++;
    repeat (2000) @(posedge clk);
    `CHECK(snk4.count == n4, "direction 2 -> 1 not monitored while 1 -> 2 selected")
    // ---- field replacement tests (fix FCS) ----
    at = {8'd1, 8'd1, 8'h02, 8'h33, 8'h33, 8'h33, 8'h33, 8'h33};
    command(T_DST_MAC, DIR_1_TO_2, 48'h0, at, none);
    through(1, f, o, got);
    e = f[0:f.size()-5]; for (int i = 0; i < 6; i++) e[i] = at[2+i];
    `CHECK(got && o[0:o.size()-5] == e && fcs_ok(o), "destination MAC replaced, FCS fixed")
    if (got && o[0:o.size()-5] == e && fcs_ok(o)) mech[M_DST]++;
    at = {8'd1, 8'd1, 8'h0E, 8'h44, 8'h44, 8'h44, 8'h44, 8'h44};
    command(T_SRC_MAC, DIR_1_TO_2, HOST_B, at, none);
    through(1, f, o, got);
    e = f[0:f.size()-5]; for (int i = 0; i < 6; i++) e[6+i] = at[2+i];
    `CHECK(got && o[0:o.size()-5] == e && fcs_ok(o), "source MAC replaced for a matching frame")
    if (got && o[0:o.size()-5] == e && fcs_ok(o)) mech[M_SRC]++;
    at = {8'd1, 8'd1, 8'h86, 8'hDD};
    command(T_ETHERTYPE, DIR_1_TO_2, 48'h0, at, none);
    through(1, f, o, got);
    e = f[0:f.size()-5]; e[12] = 8'h86; e[13] = 8'hDD;
    `CHECK(got && o[0:o.size()-5] == e && fcs_ok(o), "type replaced")
    if (got && o[0:o.size()-5] == e && fcs_ok(o)) mech[M_TYPE]++;
    at = {8'd1, 8'd1, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd10, 8'd0, 8'd3,
          8'hDE, 8'hAD, 8'hBE, 8'd0, 8'd0, 8'd0};
    command(T_PAYLOAD, DIR_1_TO_2, 48'h0, at, none);
    through(1, f, o, got);
    e = f[0:f.size()-5]; e[24] = 8'hDE; e[25] = 8'hAD; e[26] = 8'hBE;
    `CHECK(got && o[0:o.size()-5] == e && fcs_ok(o), "payload bytes replaced")
    if (got && o[0:o.size()-5] == e && fcs_ok(o)) mech[M_PAYLOAD]++;
    // ---- FCS ----
    at = {8'd1, 8'd0, 8'h01, 8'h02, 8'h03, 8'h04};
    command(T_FCS, DIR_1_TO_2, 48'h0, at, none);
    through(1, f, o, got);
    e = f[0:f.size()-5]; e = {e, 8'h01, 8'h02, 8'h03, 8'h04};
    `CHECK(got && o == e, "FCS replaced")
    if (got && o == e) mech[M_FCS]++;
    // ---- drop ----
    command(T_DROP, DIR_1_TO_2, 48'h0, '{8'd1}, none);
    n2 = snk2.count;
    src1.send(f);
    rand_bytes(60, pl); make_frame(HOST_B, HOST_A, 16'h0800, pl, h);
    through(1, h, o, got);
    `CHECK(got && o == h && snk2.count == n2 + 1, "one frame dropped, next forwarded")
    if (got && o == h && snk2.count == n2 + 1) mech[M_DROP]++;
    // ---- invert bit: payload reference, bit offset 13 ----
    command(T_INVERT_BIT, DIR_1_TO_2, 48'h0, '{8'd1, 8'd3, 8'd0, 8'd13}, none);
    through(1, f, o, got);
    e = f; e[14 + 1][5] = ~e[14 + 1][5];
    `CHECK(got && o == e, "one bit inverted")
    if (got && o == e) mech[M_INVERT]++;
    // ---- preamble: 7 nibbles, no SFD ----
    command(T_PREAMBLE, DIR_1_TO_2, 48'h0, '{8'd1, 8'd7, 8'd1}, none);
    n2 = snk2.count;
    src1.send(f);
    wait_count(snk2.count, n2 + 1, 200);
    if (snk2.count > n2) begin
      `CHECK(snk2.pre_len[n2] == 8 && !snk2.sfd_seen[n2], "7 preamble nibbles, SFD replaced")
      if (snk2.pre_len[n2] == 8 && !snk2.sfd_seen[n2]) mech[M_PREAMBLE]++;
    end
    // ---- swap ----
    command(T_SWAP, DIR_1_TO_2, 48'h0, '{8'd1}, none);
    n2 = snk2.count;
    src1.send(f); src1.send(h);
    wait_count(snk2.count, n2 + 2, 400);
    `CHECK(snk2.count == n2 + 2, "swap: both frames out")
    if (snk2.count == n2 + 2) begin
      `CHECK(snk2.frames[n2] == h && snk2.frames[n2+1] == f, "swap: order reversed")
      if (snk2.frames[n2] == h && snk2.frames[n2+1] == f) mech[M_SWAP]++;
    end
    if (u_mem.writes > 0 && u_mem.reads > 0) mech[M_MEMORY]++;
    // ---- delay N: one frame, 1 ms ----
    command(T_DELAY_N, DIR_1_TO_2, 48'h0, '{8'd1, 8'd0, 8'd1}, none);
    n2 = snk2.count;
    src1.send(f); src1.send(h);
    wait_count(snk2.count, n2 + 2, 1500);
    if (snk2.count == n2 + 2) begin
      `CHECK(snk2.frames[n2] == h && snk2.frames[n2+1] == f, "delay N: held frame after the next")
      if (snk2.frames[n2] == h && snk2.frames[n2+1] == f) mech[M_DELAY_N]++;
    end else `CHECK(0, "delay N: frames out")
    // ---- delay all: 1 ms ----
    command(T_DELAY_ALL, DIR_1_TO_2, 48'h0, '{8'd0, 8'd1}, none);
    n2 = snk2.count;
    src1.send(f); src1.send(h);
    `CHECK(snk2.count == n2, "delay all: held")
    wait_count(snk2.count, n2 + 2, 1500);
    if (snk2.count == n2 + 2) begin
      `CHECK(snk2.frames[n2] == f && snk2.frames[n2+1] == h, "delay all: order kept")
      if (snk2.frames[n2] == f && snk2.frames[n2+1] == h) mech[M_DELAY_ALL]++;
    end else `CHECK(0, "delay all: frames out")
    // ---- InterPacket Gap: 12 nibbles between two frames sent 200 apart ----
    command(T_IPG, DIR_1_TO_2, 48'h0, '{8'd12}, none);
    n2 = snk2.count;
    src1.send(f, 15, 200); src1.send(h, 15, 200);
    wait_count(snk2.count, n2 + 2, 400);
    if (snk2.count == n2 + 2) begin
      $display("ipg: gap before second frame %0d nibbles", snk2.gap_before[n2+1]);
      `CHECK(snk2.frames[n2] == f && snk2.frames[n2+1] == h, "ipg: order kept")
      `CHECK(snk2.gap_before[n2+1] == 12, "ipg: gap of 12 nibbles")
      if (snk2.frames[n2+1] == h && snk2.gap_before[n2+1] == 12) mech[M_IPG]++;
    end else `CHECK(0, "ipg: frames out")
    // ---- custom frame ----
    rand_bytes(80, pl); make_frame(48'hFFFFFFFFFFFF, HOST_A, 16'h88B5, pl, g);
    n2 = snk2.count;
    command(T_CUSTOM, DIR_1_TO_2, 48'h0, none, g);
    wait_count(snk2.count, n2 + 1, 200);
    `CHECK(snk2.count == n2 + 1 && snk2.frames[n2] == g, "custom frame sent")
    if (snk2.count == n2 + 1 && snk2.frames[n2] == g) mech[M_CUSTOM]++;
    // ---- DoS block and allow, 1 ms each ----
    n2 = snk2.count;
    command(T_DOS_BLOCK, DIR_1_TO_2, 48'h0, '{8'd0, 8'd1}, g);
    repeat (40000) @(posedge clk);
    begin
      int k = 0;
      for (int i = n2; i < snk2.count; i++) if (snk2.frames[i] == g) k++;
      `CHECK(k > 3 && k == snk2.count - n2, $sformatf("DoS block: %0d copies", k))
      if (k > 3) mech[M_DOS_BLOCK]++;
    end
    n2 = snk2.count;
    command(T_DOS_ALLOW, DIR_1_TO_2, 48'h0, '{8'd0, 8'd1}, g);
    repeat (40000) @(posedge clk);
    begin
      int k = 0;
      for (int i = n2; i < snk2.count; i++) if (snk2.frames[i] == g) k++;
      `CHECK(k > 3, $sformatf("DoS allow: %0d copies", k))
      if (k > 3) mech[M_DOS_ALLOW]++;
    end
    `CHECK(test_active == 2'b00, "no test left running")
    // ---- direction change, then a test on 2 -> 1 ----
    command(T_DIRECTION, DIR_2_TO_1, 48'h0, none, none);
    `CHECK(dir == 1, "direction 2 -> 1 selected")
    at = {8'd1, 8'd1, 8'h02, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55};
    command(T_DST_MAC, DIR_2_TO_1, 48'h0, at, none);
    make_frame(HOST_A, HOST_B, 16'h0800, pl, g);
    n4 = snk4.count;
    through(2, g, o, got);
    e = g[0:g.size()-5]; for (int i = 0; i < 6; i++) e[i] = at[2+i];
    repeat (2000) @(posedge clk);
    `CHECK(got && o[0:o.size()-5] == e && fcs_ok(o), "2 -> 1 destination replaced")
    `CHECK(snk4.count == n4 + 1 && snk4.frames[n4] == g, "port 4 follows the new direction")
    if (got && o[0:o.size()-5] == e && snk4.count == n4 + 1) mech[M_DIRECTION]++;
    `CHECK(snk1.err_seen.sum() == 0 && snk2.err_seen.sum() == 0, "no transmit errors")
    // ---- every mechanism seen ----
    foreach (mech[i]) begin
      $display("mechanism %-10s %0d", mech_name[i], mech[i]);
      `CHECK(mech[i] > 0, $sformatf("mechanism %s happened", mech_name[i]))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
