// eth_modifier_tb: one direction of the tester, from the received byte
// stream in the core clock to MII transmit nibbles, with the memory FIFO and
// a DDR2 model attached. Checks plain forwarding (content, preamble, the
// monitor copy and the frame counter), a type replacement with a recomputed
// FCS, a conditional drop that only hits frames to the given address, a
// preamble change, and a swap of two frames through the memory; also that
// the test is reported active until it is done.
`timescale 1ns/1ps
module eth_modifier_tb;
  `include "tb_util.svh"
  import eth_pkg::*;
  logic clk = 0, tx_clk = 0, rst = 1;
  always #20 clk = ~clk;
  always #20.003 tx_clk = ~tx_clk;
  logic [7:0] s_byte = 0;
  logic s_new = 0, s_frame = 0, s_last = 0;
  logic cmd_valid = 0;
  logic [7:0] cmd_test = 0, test_sel;
  logic [ATTR_W-1:0] cmd_attr = '0;
  logic [47:0] cmd_dest = '0;
  logic test_active;
  logic m_wr_en, m_wr_nb, m_rd_en, m_ack;
  logic [7:0] m_wr_data, rd_data, mon_byte;
  logic data_available, frame_ready, mem_empty, mem_full;
  logic [3:0] txd;
  logic tx_en, tx_er, mon_wr_en, mon_last;
  logic [31:0] frames_out;
  logic mwc, mrc, mrv;
  logic [15:0] mwa, mra;
  logic [31:0] mwd, mrd;
  eth_modifier dut (.clk, .rst, .rx_byte_i(s_byte), .rx_new_byte_i(s_new), .rx_frame_i(s_frame),
    .rx_last_i(s_last), .cmd_valid_i(cmd_valid), .cmd_test_i(cmd_test), .cmd_attr_i(cmd_attr),
    .cmd_dest_i(cmd_dest), .test_active_o(test_active), .test_sel_o(test_sel),
    .mem_wr_enable_o(m_wr_en), .mem_wr_data_o(m_wr_data), .mem_wr_new_byte_o(m_wr_nb),
    .mem_rd_enable_o(m_rd_en), .mem_rd_byte_ack_o(m_ack), .mem_rd_data_i(rd_data),
    .mem_rd_data_available_i(data_available), .mem_rd_frame_ready_i(frame_ready),
    .mem_empty_i(mem_empty), .mem_full_i(mem_full), .tx_clk, .tx_rst(rst), .txd, .tx_en, .tx_er,
    .mon_wr_en, .mon_byte, .mon_last, .frames_out);
  mem_fifos #(.MEM_AW(16)) u_mf (.clk, .rst, .wr_enable(m_wr_en), .wr_new_byte(m_wr_nb),
    .wr_data(m_wr_data), .mem_full, .rd_enable(m_rd_en), .rd_data, .byte_ack(m_ack),
    .data_available, .frame_ready, .mem_empty, .mem_wr_cmd_en(mwc), .mem_wr_addr(mwa),
    .mem_wr_data(mwd), .mem_rd_cmd_en(mrc), .mem_rd_addr(mra), .mem_rd_data_valid(mrv),
    .mem_rd_data(mrd));
  ddr2_mem_model #(.AW(16)) u_mem (.clk, .wr_cmd_en(mwc), .wr_addr(mwa), .wr_data(mwd),
    .rd_cmd_en(mrc), .rd_addr(mra), .rd_data_valid(mrv), .rd_data(mrd));
  mii_sink snk (.clk(tx_clk), .rst, .en(tx_en), .er(tx_er), .d(txd));
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] mon[$];
  always @(posedge clk) if (!rst && mon_wr_en) mon.push_back(mon_byte);
  task automatic send(input logic [7:0] f[$]);
    foreach (f[i]) begin
      @(negedge clk); s_frame = 1; s_new = 1; s_byte = f[i]; s_last = (i == f.size() - 1);
      @(negedge clk); s_new = 0; s_last = 0;
    end
    @(negedge clk); s_frame = 0;
    repeat (40) @(negedge clk);
  endtask
  task automatic command(input logic [7:0] id, input logic [47:0] d, input logic [7:0] at[$]);
    cmd_attr = '0;
    foreach (at[i]) cmd_attr[8*i +: 8] = at[i];
    @(negedge clk); cmd_valid = 1; cmd_test = id; cmd_dest = d;
    @(negedge clk); cmd_valid = 0;
  endtask
  task automatic wait_sink(input int n);
    int g = 0;
    while (snk.count < n && g < 20000) begin @(negedge clk); g++; end
  endtask
  function automatic bit fcs_ok(input logic [7:0] f[$]);
    logic [7:0] b[$];
    logic [31:0] c;
    b = f[0:f.size()-5]; c = ref_crc(b);
    return {f[f.size()-1], f[f.size()-2], f[f.size()-3], f[f.size()-4]} == c;
  endfunction
  initial begin
    logic [7:0] f[$], g[$], pl[$], e[$];
    int n;
    repeat (5) @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);
    rand_bytes(80, pl); make_frame(48'h0200000000AA, 48'h0A01, 16'h0800, pl, f);
    rand_bytes(50, pl); make_frame(48'h0200000000BB, 48'h0A02, 16'h0800, pl, g);
    // plain
    send(f); wait_sink(1);
    `CHECK(snk.count == 1 && snk.frames[0] == f, "plain forwarding")
    `CHECK(snk.pre_len[0] == 15 && snk.sfd_seen[0], "standard preamble")
    `CHECK(mon == f && frames_out == 1, "monitor copy and counter")
    // type with FCS fix
    command(T_ETHERTYPE, 48'h0, '{8'd1, 8'd1, 8'h88, 8'hB5});
    @(negedge clk);
    `CHECK(test_active && test_sel == T_ETHERTYPE, "test active")
    send(f); wait_sink(2);
    e = f[0:f.size()-5]; e[12] = 8'h88; e[13] = 8'hB5;
    `CHECK(snk.count == 2 && snk.frames[1][0:f.size()-5] == e && fcs_ok(snk.frames[1]), "type replaced, FCS fixed")
    `CHECK(!test_active, "test done")
    // conditional drop
    command(T_DROP, 48'h0200000000BB, '{8'd1});
    send(f); send(g); send(f); wait_sink(4);
    `CHECK(snk.count == 4 && snk.frames[2] == f && snk.frames[3] == f, "only the frame to BB dropped")
    // preamble
    command(T_PREAMBLE, 48'h0, '{8'd1, 8'd20, 8'd0});
    send(f); wait_sink(5);
    `CHECK(snk.pre_len[4] == 20 && snk.sfd_seen[4] && snk.frames[4] == f, "20 preamble nibbles")
    // swap through memory
    command(T_SWAP, 48'h0, '{8'd1});
    send(f); send(g); wait_sink(7);
    `CHECK(snk.count == 7 && snk.frames[5] == g && snk.frames[6] == f, "swap through memory")
    `CHECK(u_mem.writes > 0 && mem_empty, "memory used and empty again")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
