// eth_tester_top: Ethernet media level tester with four MII ports.
//
// The tester is placed in a link between two devices. Port 1 and port 2
// carry that link: frames received on one are passed, through an Ethernet
// modifier, to the transmitter of the other. Port 3 connects the control PC,
// which sends UDP commands and gets ARP replies; its transmitter also
// carries a copy of the frames the tester sends in the direction under test.
// Port 4 transmits a copy of the frames received in that direction, before
// any modification. A shared external memory (DDR2 behind a vendor memory
// controller, outside this design) stores frames for the delay, reorder,
// custom-frame and denial-of-service tests; its simple word port is brought
// out here.
//
// Blocks and data flow:
//   port 1 RX -> rx_front -> eth_modifier u_mod1 -> port 2 TX
//   port 2 RX -> rx_front -> eth_modifier u_mod2 -> port 1 TX
//   port 3 RX -> rx_front -> udp_arp_rx -> instr_decode -> commands to the
//                modifier of the chosen direction, frames to the memory
//   udp_arp_tx (ARP replies) + modifier copy -> monitor_selector -> port 3 TX
//   raw port 1/2 RX copy -> monitor_selector -> port 4 TX
//   modifiers and decoder <-> mem_io_mux <-> mem_fifos <-> memory port
//
// Clocks: `clk` is the core clock (25 MHz in the tester); each MII port has
// its own receive and transmit clocks from the PHY (25 MHz in 100 Mbit/s
// mode). All crossings are asynchronous FIFOs. `rst` is synchronous to `clk`
// and is also used, asynchronously, by the FIFOs and MII logic of the port
// clocks (so lint reports it as used both ways, which is intended); hold it
// for a few cycles of every clock. Port arrays are indexed
// 0..3 for ports 1..4; port 4 has no receiver in use.
// The partition into modifiers, command path, memory FIFO and monitor ports
// follows the tester; the port and memory interface details are this
// design's own.
module eth_tester_top #(
  parameter int unsigned CLK_HZ = 25_000_000,
  parameter int unsigned MEM_AW = 26
) (
  input  logic              clk,
  input  logic              rst,
  // MII receivers of ports 1..3
  input  logic [2:0]        rx_clk,
  input  logic [2:0]        rx_dv,
  input  logic [2:0]        rx_er,
  input  logic [3:0]        rxd [3],
  // MII transmitters of ports 1..4
  input  logic [3:0]        tx_clk,
  output logic [3:0]        txd [4],
  output logic [3:0]        tx_en,
  output logic [3:0]        tx_er,
  // word port of the external memory controller
  output logic              mem_wr_cmd_en,
  output logic [MEM_AW-1:0] mem_wr_addr,
  output logic [31:0]       mem_wr_data,
  output logic              mem_rd_cmd_en,
  output logic [MEM_AW-1:0] mem_rd_addr,
  input  logic              mem_rd_data_valid,
  input  logic [31:0]       mem_rd_data,
  // status
  output logic              dir,            // 0: port 1 -> 2 under test
  output logic              addr_valid,
  output logic [1:0]        test_active,
  output logic [31:0]       frames_out [2],
  output logic [31:0]       cmd_frames
);
  import eth_pkg::*;

  // ---- receivers into the core clock ------------------------------------
  logic [7:0] r_byte [3];
  logic [2:0] r_new, r_frame, r_last, r_err;
  for (genvar p = 0; p < 3; p++) begin : g_rx
    rx_front u_rx (
      .rx_clk(rx_clk[p]), .rx_rst(rst), .rx_dv(rx_dv[p]), .rx_er(rx_er[p]), .rxd(rxd[p]),
      .clk, .rst, .byte_o(r_byte[p]), .new_byte_o(r_new[p]), .frame_o(r_frame[p]),
      .last_o(r_last[p]), .err_o(r_err[p]));
  end

  // ---- command path -----------------------------------------------------
  logic [7:0]  udp_byte;
  logic        udp_new_byte, udp_data_en, arp_found;
  logic [47:0] arp_sha, pc_mac, dev_mac, cmd_dest;
  logic [31:0] arp_spa, dev_ip, pc_ip;
  logic [15:0] dev_port, pc_port;
  logic        cmd_valid, dir_changed, init_valid;
  logic [7:0]  cmd_test;
  logic [ATTR_W-1:0] cmd_attr;
  logic        dec_active, dec_wr_enable, dec_wr_new_byte;
  logic [7:0]  dec_wr_data;

  udp_arp_rx u_udp_rx (
    .clk, .rst, .rx_byte(r_byte[2]), .rx_new_byte(r_new[2]), .rx_frame(r_frame[2]),
    .rx_err(r_err[2]), .dev_mac, .dev_ip, .dev_port, .udp_byte, .udp_new_byte,
    .udp_data_en, .arp_found, .arp_sha, .arp_spa, .udp_frames(cmd_frames));

  instr_decode u_dec (
    .clk, .rst, .udp_byte, .udp_new_byte, .udp_data_en, .cmd_valid, .cmd_test,
    .cmd_attr, .cmd_dest, .dir, .dir_changed, .init_valid, .addr_valid, .dev_ip,
    .pc_ip, .dev_port, .pc_port, .pc_mac, .dev_mac, .mem_active(dec_active),
    .mem_wr_enable(dec_wr_enable), .mem_wr_new_byte(dec_wr_new_byte),
    .mem_wr_data(dec_wr_data));

  logic       inj_busy, inj_wr_en, inj_last, inj_allowed, arp_sent, udp_sent, udp_pull;
  logic [7:0] inj_byte;

  // Advanced monitoring (UDP-wrapped copies) is not driven: no datagram is
  // ever requested, only ARP replies are sent.
  udp_arp_tx u_udp_tx (
    .clk, .rst, .init_valid, .dev_ip, .pc_ip, .dev_port, .pc_port, .pc_mac, .dev_mac,
    .arp_found, .arp_sha, .arp_spa, .udp_req(1'b0), .udp_len(11'd0), .udp_data(8'd0),
    .udp_pull, .tx_allowed(inj_allowed), .wr_en(inj_wr_en), .wr_byte(inj_byte),
    .wr_last(inj_last), .busy(inj_busy), .arp_sent, .udp_sent);

  // ---- the two Ethernet modifiers ---------------------------------------
  logic [1:0] m_cmd_valid;
  assign m_cmd_valid = {cmd_valid && dir, cmd_valid && !dir};

  logic [1:0] m_wr_enable, m_wr_new_byte, m_rd_enable, m_rd_byte_ack;
  logic [7:0] m_wr_data [2];
  logic [1:0] m_data_available, m_frame_ready, m_empty, m_full;
  logic [7:0] mf_rd_data;
  logic [1:0] mon_wr_en, mon_last;
  logic [7:0] mon_byte [2];
  logic [7:0] test_sel [2];
  logic [3:0] m_txd [2];
  logic [1:0] m_tx_en, m_tx_er;

  for (genvar m = 0; m < 2; m++) begin : g_mod
    // modifier 0 takes port 1 RX and drives port 2 TX, modifier 1 the reverse
    eth_modifier #(.CLK_HZ(CLK_HZ)) u_mod (
      .clk, .rst,
      .rx_byte_i(r_byte[m]), .rx_new_byte_i(r_new[m]), .rx_frame_i(r_frame[m]),
      .rx_last_i(r_last[m]),
      .cmd_valid_i(m_cmd_valid[m]), .cmd_test_i(cmd_test), .cmd_attr_i(cmd_attr),
      .cmd_dest_i(cmd_dest), .test_active_o(test_active[m]), .test_sel_o(test_sel[m]),
      .mem_wr_enable_o(m_wr_enable[m]), .mem_wr_data_o(m_wr_data[m]),
      .mem_wr_new_byte_o(m_wr_new_byte[m]), .mem_rd_enable_o(m_rd_enable[m]),
      .mem_rd_byte_ack_o(m_rd_byte_ack[m]), .mem_rd_data_i(mf_rd_data),
      .mem_rd_data_available_i(m_data_available[m]),
      .mem_rd_frame_ready_i(m_frame_ready[m]), .mem_empty_i(m_empty[m]),
      .mem_full_i(m_full[m]),
      .tx_clk(tx_clk[1-m]), .tx_rst(rst), .txd(m_txd[m]), .tx_en(m_tx_en[m]),
      .tx_er(m_tx_er[m]),
      .mon_wr_en(mon_wr_en[m]), .mon_byte(mon_byte[m]), .mon_last(mon_last[m]),
      .frames_out(frames_out[m]));
  end

  assign txd[0]   = m_txd[1];
  assign tx_en[0] = m_tx_en[1];
  assign tx_er[0] = m_tx_er[1];
  assign txd[1]   = m_txd[0];
  assign tx_en[1] = m_tx_en[0];
  assign tx_er[1] = m_tx_er[0];

  // ---- shared memory FIFO -----------------------------------------------
  logic       mf_wr_enable, mf_wr_new_byte, mf_rd_enable, mf_byte_ack;
  logic [7:0] mf_wr_data;
  logic       mf_data_available, mf_frame_ready, mf_empty, mf_full;

  mem_io_mux u_mux (
    .dir, .dec_active, .dec_wr_enable, .dec_wr_new_byte, .dec_wr_data,
    .m_wr_enable, .m_wr_new_byte, .m_wr_data, .m_rd_enable, .m_rd_byte_ack,
    .m_data_available, .m_frame_ready, .m_empty, .m_full,
    .wr_enable(mf_wr_enable), .wr_new_byte(mf_wr_new_byte), .wr_data(mf_wr_data),
    .rd_enable(mf_rd_enable), .byte_ack(mf_byte_ack),
    .data_available(mf_data_available), .frame_ready(mf_frame_ready),
    .mem_empty(mf_empty), .mem_full(mf_full));

  mem_fifos #(.MEM_AW(MEM_AW)) u_memf (
    .clk, .rst, .wr_enable(mf_wr_enable), .wr_new_byte(mf_wr_new_byte),
    .wr_data(mf_wr_data), .mem_full(mf_full), .rd_enable(mf_rd_enable),
    .rd_data(mf_rd_data), .byte_ack(mf_byte_ack), .data_available(mf_data_available),
    .frame_ready(mf_frame_ready), .mem_empty(mf_empty),
    .mem_wr_cmd_en, .mem_wr_addr, .mem_wr_data, .mem_rd_cmd_en, .mem_rd_addr,
    .mem_rd_data_valid, .mem_rd_data);

  // ---- monitor ports ----------------------------------------------------
  // port 3: frames sent in the direction under test, plus ARP replies
  logic       p3_wr_en, p3_last, p4_wr_en, p4_last;
  logic [7:0] p3_byte, p4_byte;
  logic [31:0] p3_frames, p4_frames;
  logic       p3_full, p3_avail, p3_empty, p4_full, p4_avail, p4_empty, p4_allowed;

  monitor_selector u_sel3 (
    .clk, .rst, .sel(dir),
    .a_wr_en(mon_wr_en[0]), .a_byte(mon_byte[0]), .a_last(mon_last[0]),
    .b_wr_en(mon_wr_en[1]), .b_byte(mon_byte[1]), .b_last(mon_last[1]),
    .inj_busy, .inj_wr_en, .inj_byte, .inj_last, .inj_allowed,
    .out_wr_en(p3_wr_en), .out_byte(p3_byte), .out_last(p3_last), .frames_fwd(p3_frames));

  tx_double_fifo u_tx3 (
    .clk, .rst, .wr_en(p3_wr_en), .wr_byte(p3_byte), .wr_last(p3_last), .wr_pre_mod(1'b0),
    .fifo_full(p3_full), .fifo_available(p3_avail), .fifo_empty(p3_empty),
    .tx_clk(tx_clk[2]), .tx_rst(rst), .pre_nibbles(6'(PREAMBLE_NIBBLES_STD)),
    .sfd_en(1'b1), .ipg_nibbles(8'(IPG_NIBBLES_STD)),
    .txd(txd[2]), .tx_en(tx_en[2]), .tx_er(tx_er[2]));

  // port 4: frames received in the direction under test, unmodified
  monitor_selector u_sel4 (
    .clk, .rst, .sel(dir),
    .a_wr_en(r_new[0]), .a_byte(r_byte[0]), .a_last(r_last[0]),
    .b_wr_en(r_new[1]), .b_byte(r_byte[1]), .b_last(r_last[1]),
    .inj_busy(1'b0), .inj_wr_en(1'b0), .inj_byte(8'd0), .inj_last(1'b0),
    .inj_allowed(p4_allowed),
    .out_wr_en(p4_wr_en), .out_byte(p4_byte), .out_last(p4_last), .frames_fwd(p4_frames));

  tx_double_fifo u_tx4 (
    .clk, .rst, .wr_en(p4_wr_en), .wr_byte(p4_byte), .wr_last(p4_last), .wr_pre_mod(1'b0),
    .fifo_full(p4_full), .fifo_available(p4_avail), .fifo_empty(p4_empty),
    .tx_clk(tx_clk[3]), .tx_rst(rst), .pre_nibbles(6'(PREAMBLE_NIBBLES_STD)),
    .sfd_en(1'b1), .ipg_nibbles(8'(IPG_NIBBLES_STD)),
    .txd(txd[3]), .tx_en(tx_en[3]), .tx_er(tx_er[3]));
endmodule
