// eth_modifier: one direction of the tester, from one port's receiver to the
// other port's transmitter.
//
// Frames pass through four stages. The frame state handler registers each
// received byte and tags it with its field and index. All test blocks see
// that stream at once; only the one selected by the latest command is
// enabled, and the test selector multiplexers route its outputs (data,
// post-processing controls, memory signals) onward, or the unmodified
// stream when no test runs. Post-processing applies delay, FCS fix, swap and
// discard, and writes the frame into the transmit block: a double FIFO into
// the transmit clock and the MII transmitter. With no test running a frame
// is forwarded with a delay of a few byte times plus the preamble.
//
// Commands arrive as a `cmd_valid_i` pulse with the test ID, attributes and
// conditional address; the block latches them and enables the test until it
// reports done (a new command replaces a running one). The memory FIFO
// signals go to the shared memory FIFO block through the memory mux. The
// bytes written to the transmit FIFO are also offered on `mon_*` for the
// monitor port. The transmit gap is 24 nibbles except while the IPG test
// runs, when it is the test's attribute. Two instances make the two
// directions. Structure and test
// selection follow the tester; the interface details are this design's.
module eth_modifier #(
  parameter int unsigned CLK_HZ  = 25_000_000,
  parameter int unsigned TX_AW   = 11
) (
  input  logic        clk,
  input  logic        rst,
  // received stream (core clock)
  input  logic [7:0]  rx_byte_i,
  input  logic        rx_new_byte_i,
  input  logic        rx_frame_i,
  input  logic        rx_last_i,
  // command
  input  logic        cmd_valid_i,
  input  logic [7:0]  cmd_test_i,
  input  logic [eth_pkg::ATTR_W-1:0] cmd_attr_i,
  input  logic [47:0] cmd_dest_i,
  output logic        test_active_o,
  output logic [7:0]  test_sel_o,
  // memory FIFO user side
  output logic        mem_wr_enable_o,
  output logic [7:0]  mem_wr_data_o,
  output logic        mem_wr_new_byte_o,
  output logic        mem_rd_enable_o,
  output logic        mem_rd_byte_ack_o,
  input  logic [7:0]  mem_rd_data_i,
  input  logic        mem_rd_data_available_i,
  input  logic        mem_rd_frame_ready_i,
  input  logic        mem_empty_i,
  input  logic        mem_full_i,
  // transmit port
  input  logic        tx_clk,
  input  logic        tx_rst,
  output logic [3:0]  txd,
  output logic        tx_en,
  output logic        tx_er,
  // monitor copy of the transmitted bytes
  output logic        mon_wr_en,
  output logic [7:0]  mon_byte,
  output logic        mon_last,
  output logic [31:0] frames_out
);
  import eth_pkg::*;

  // ---------------- pre-process: frame state handler ----------------
  logic [7:0]  pb;
  logic        pnew, pframe, plast_unused;
  frame_state_e pstate;
  logic [15:0] pidx;
  frame_state u_state (
    .clk, .rst, .byte_i(rx_byte_i), .new_byte_i(rx_new_byte_i), .frame_i(rx_frame_i),
    .last_i(rx_last_i), .byte_o(pb), .new_byte_o(pnew), .frame_o(pframe),
    .last_o(plast_unused), .state_o(pstate), .index_o(pidx)
  );

  // ---------------- command latch / test enable ----------------
  logic [7:0]  sel;
  logic        enabled;
  logic [ATTR_W-1:0] attr;
  logic [47:0] dest;
  logic        done_any;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel <= T_NONE; enabled <= 1'b0; attr <= '0; dest <= '0;
    end else if (cmd_valid_i) begin
      sel <= cmd_test_i; attr <= cmd_attr_i; dest <= cmd_dest_i; enabled <= 1'b1;
    end else if (done_any) begin
      enabled <= 1'b0;
    end
  end
  assign test_active_o = enabled;
  assign test_sel_o    = sel;

  function automatic logic en_for(input logic [7:0] id);
    return enabled && sel == id;
  endfunction

  // ---------------- test blocks ----------------
  localparam int NF = 4;
  logic [7:0] f_byte [NF];
  logic       f_new  [NF], f_done [NF], f_fix [NF];
  logic [3:0] f_dly  [NF];
  localparam logic [7:0] FIELD_ID [NF] = '{T_DST_MAC, T_SRC_MAC, T_ETHERTYPE, T_PAYLOAD};

  for (genvar i = 0; i < NF; i++) begin : g_field
    test_field_replace #(.FIELD(i)) u_t (
      .clk, .rst, .cmd_enabled_i(en_for(FIELD_ID[i])), .cmd_attributes_i(attr),
      .cmd_dest_check_addr_i(dest), .rx_byte_i(pb), .rx_new_byte_receive_i(pnew),
      .rx_frame_receiving_i(pframe), .rx_frame_state_i(pstate), .rx_index_i(pidx),
      .rx_byte_o(f_byte[i]), .rx_new_byte_o(f_new[i]), .test_done_o(f_done[i]),
      .fix_checksum_o(f_fix[i]), .delay_data_byte_o(f_dly[i])
    );
  end

  logic [7:0]  fcs_byte; logic fcs_new, fcs_done, fcs_swap; logic [3:0] fcs_dly; logic [31:0] fcs_data;
  test_fcs u_fcs (
    .clk, .rst, .cmd_enabled_i(en_for(T_FCS)), .cmd_attributes_i(attr), .cmd_dest_check_addr_i(dest),
    .rx_byte_i(pb), .rx_new_byte_receive_i(pnew), .rx_frame_receiving_i(pframe),
    .rx_frame_state_i(pstate), .rx_index_i(pidx), .rx_byte_o(fcs_byte), .rx_new_byte_o(fcs_new),
    .test_done_o(fcs_done), .delay_data_byte_o(fcs_dly), .swap_en_o(fcs_swap), .swap_data_o(fcs_data)
  );

  logic [7:0]  drp_byte; logic drp_new, drp_done, drp_disc; logic [3:0] drp_dly;
  test_drop u_drop (
    .clk, .rst, .cmd_enabled_i(en_for(T_DROP)), .cmd_attributes_i(attr), .cmd_dest_check_addr_i(dest),
    .rx_byte_i(pb), .rx_new_byte_receive_i(pnew), .rx_frame_receiving_i(pframe),
    .rx_frame_state_i(pstate), .rx_index_i(pidx), .rx_byte_o(drp_byte), .rx_new_byte_o(drp_new),
    .test_done_o(drp_done), .delay_data_byte_o(drp_dly), .discard_o(drp_disc)
  );

  logic [7:0]  inv_byte; logic inv_new, inv_done; logic [3:0] inv_dly;
  test_invert_bit u_inv (
    .clk, .rst, .cmd_enabled_i(en_for(T_INVERT_BIT)), .cmd_attributes_i(attr), .cmd_dest_check_addr_i(dest),
    .rx_byte_i(pb), .rx_new_byte_receive_i(pnew), .rx_frame_receiving_i(pframe),
    .rx_frame_state_i(pstate), .rx_index_i(pidx), .rx_byte_o(inv_byte), .rx_new_byte_o(inv_new),
    .test_done_o(inv_done), .delay_data_byte_o(inv_dly)
  );

  logic [7:0]  pre_byte; logic pre_new, pre_done, pre_mod, sfd_en; logic [5:0] pre_nib;
  test_preamble u_pre (
    .clk, .rst, .cmd_enabled_i(en_for(T_PREAMBLE)), .cmd_attributes_i(attr), .cmd_dest_check_addr_i(dest),
    .rx_byte_i(pb), .rx_new_byte_receive_i(pnew), .rx_frame_receiving_i(pframe),
    .rx_frame_state_i(pstate), .rx_index_i(pidx), .rx_byte_o(pre_byte), .rx_new_byte_o(pre_new),
    .test_done_o(pre_done), .pre_mod_o(pre_mod), .pre_nibbles_o(pre_nib), .sfd_en_o(sfd_en)
  );

  logic mem_test;
  assign mem_test = enabled && (sel == T_SWAP || sel == T_DELAY_N || sel == T_DELAY_ALL ||
                                sel == T_CUSTOM || sel == T_DOS_BLOCK || sel == T_DOS_ALLOW ||
                                sel == T_IPG);
  // Gap for the transmitter: the IPG test's attribute while it runs, else the
  // standard 24 nibbles. The transmitter samples it at the end of each frame;
  // it changes only between tests, so it is taken into the transmit clock
  // without a synchronizer.
  logic [7:0] ipg_nib;
  assign ipg_nib = (mem_test && sel == T_IPG && attr[7:0] != 0) ? attr[7:0]
                                                                : 8'(IPG_NIBBLES_STD);
  logic [7:0] m_byte; logic m_new, m_frame, m_done;
  logic tx_full, tx_avail, tx_empty;
  test_mem_frames #(.CLK_HZ(CLK_HZ)) u_mem (
    .clk, .rst, .cmd_enabled_i(mem_test), .test_select_i(sel), .cmd_attributes_i(attr),
    .rx_byte_i(pb), .rx_new_byte_receive_i(pnew), .rx_frame_receiving_i(pframe),
    .rx_byte_o(m_byte), .rx_new_byte_o(m_new), .rx_frame_o(m_frame), .test_done_o(m_done),
    .tx_fifo_full_i(tx_full), .tx_fifo_available_i(tx_avail), .tx_fifo_empty_i(tx_empty),
    .mem_rd_data_i, .mem_rd_data_available_i, .mem_rd_frame_ready_i, .mem_empty_i, .mem_full_i,
    .mem_wr_enable_o, .mem_wr_data_o, .mem_wr_new_byte_o, .mem_rd_enable_o, .mem_rd_byte_ack_o
  );

  // ---------------- test selector multiplexers ----------------
  logic [7:0]  s_byte;
  logic        s_new, s_frame, s_fix, s_swap, s_disc, s_pre;
  logic [3:0]  s_dly;
  always_comb begin
    s_byte = pb; s_new = pnew; s_frame = pframe; s_fix = 1'b0; s_dly = '0;
    s_swap = 1'b0; s_disc = 1'b0; s_pre = 1'b0; done_any = 1'b0;
    case (sel)
      T_DST_MAC:   begin s_byte = f_byte[0]; s_new = f_new[0]; s_fix = f_fix[0]; s_dly = f_dly[0]; done_any = f_done[0]; end
      T_SRC_MAC:   begin s_byte = f_byte[1]; s_new = f_new[1]; s_fix = f_fix[1]; s_dly = f_dly[1]; done_any = f_done[1]; end
      T_ETHERTYPE: begin s_byte = f_byte[2]; s_new = f_new[2]; s_fix = f_fix[2]; s_dly = f_dly[2]; done_any = f_done[2]; end
      T_PAYLOAD:   begin s_byte = f_byte[3]; s_new = f_new[3]; s_fix = f_fix[3]; s_dly = f_dly[3]; done_any = f_done[3]; end
      T_FCS:       begin s_byte = fcs_byte; s_new = fcs_new; s_dly = fcs_dly; s_swap = fcs_swap; done_any = fcs_done; end
      T_DROP:      begin s_byte = drp_byte; s_new = drp_new; s_dly = drp_dly; s_disc = drp_disc; done_any = drp_done; end
      T_INVERT_BIT:begin s_byte = inv_byte; s_new = inv_new; s_dly = inv_dly; done_any = inv_done; end
      T_PREAMBLE:  begin s_byte = pre_byte; s_new = pre_new; s_pre = pre_mod; done_any = pre_done; end
      T_SWAP, T_DELAY_N, T_DELAY_ALL, T_CUSTOM, T_DOS_BLOCK, T_DOS_ALLOW, T_IPG:
                   begin s_byte = m_byte; s_new = m_new; s_frame = m_frame; done_any = m_done; end
      default: ;
    endcase
  end

  // ---------------- post-process and transmit block ----------------
  logic       wr_en, wr_last, wr_pre;
  logic [7:0] wr_byte;
  postprocess u_post (
    .clk, .rst, .byte_i(s_byte), .new_byte_i(s_new), .frame_i(s_frame), .delay_i(s_dly),
    .fix_checksum_i(s_fix), .swap_en_i(s_swap), .swap_data_i(fcs_data), .discard_i(s_disc),
    .pre_mod_i(s_pre), .wr_en, .wr_byte, .wr_last, .wr_pre_mod(wr_pre), .frames_out
  );

  tx_double_fifo #(.AW(TX_AW)) u_tx (
    .clk, .rst, .wr_en, .wr_byte, .wr_last, .wr_pre_mod(wr_pre),
    .fifo_full(tx_full), .fifo_available(tx_avail), .fifo_empty(tx_empty),
    .tx_clk, .tx_rst, .pre_nibbles(pre_nib), .sfd_en, .ipg_nibbles(ipg_nib),
    .txd, .tx_en, .tx_er
  );

  assign mon_wr_en = wr_en;
  assign mon_byte  = wr_byte;
  assign mon_last  = wr_last;
endmodule
