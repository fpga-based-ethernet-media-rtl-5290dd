// test_preamble_tb: checks that the preamble test marks the frames it acts
// on, passes the nibble count (limited to 38) and the SFD choice on to the
// transmitter, leaves data unchanged and reports done after the amount.
`timescale 1ns/1ps
module test_preamble_tb;
  `include "tb_util.svh"
  `include "test_harness.svh"
  logic [7:0] ob;
  logic on, done, pre_mod, sfd_en;
  logic [5:0] pre_n;
  int ndone = 0, nmod = 0;
  logic [7:0] got[$];
  test_preamble dut (.clk, .rst, .cmd_enabled_i(cmd_enabled), .cmd_attributes_i(attr),
    .cmd_dest_check_addr_i(dest), .rx_byte_i(fs_byte), .rx_new_byte_receive_i(fs_new),
    .rx_frame_receiving_i(fs_frame), .rx_frame_state_i(fs_state), .rx_index_i(fs_index),
    .rx_byte_o(ob), .rx_new_byte_o(on), .test_done_o(done), .pre_mod_o(pre_mod),
    .pre_nibbles_o(pre_n), .sfd_en_o(sfd_en));
  always @(posedge clk) if (!rst) begin
    if (on) got.push_back(ob);
    if (on && pre_mod) nmod++;
    if (done) ndone++;
  end
  initial begin
    logic [7:0] f[$], pl[$];
    repeat (3) @(negedge clk); rst = 0;
    `CHECK(pre_n == 15 && sfd_en, "standard preamble after reset")
    rand_bytes(50, pl);
    make_frame(48'h0200000000AA, 48'h0A0000000001, 16'h0800, pl, f);
    set_attr(0, 2); set_attr(1, 8'd7); set_attr(2, 8'd1);
    cmd_enabled = 1;
    got = {}; send(f);
    `CHECK(got == f, "data unchanged")
    `CHECK(nmod > 0, "frame marked for a modified preamble")
    `CHECK(pre_n == 7 && !sfd_en, "7 nibbles, SFD replaced")
    send(f);
    `CHECK(ndone == 1, "done after two frames")
    cmd_enabled = 0; nmod = 0;
    send(f);
    `CHECK(nmod == 0, "no mark when off")
    set_attr(0, 1); set_attr(1, 8'd60); set_attr(2, 8'd0); cmd_enabled = 1;
    send(f);
    `CHECK(pre_n == 38 && sfd_en, "nibble count limited to 38")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
