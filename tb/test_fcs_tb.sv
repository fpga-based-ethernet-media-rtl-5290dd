// test_fcs_tb: the FCS test in front of the post-processing stage. Checks
// that a frame leaves with its last four bytes replaced by the attribute
// value (low byte first), that a conditional address limits the test to
// matching frames, that `test_done_o` follows the amount attribute, and that
// frames pass unchanged when the test is off.
`timescale 1ns/1ps
module test_fcs_tb;
  `include "tb_util.svh"
  `include "test_harness.svh"
  logic [7:0] ob, wr_byte;
  logic on, done, swap_en, wr_en, wr_last, wr_pre_mod;
  logic [3:0] dly;
  logic [31:0] swap_data, frames_out;
  int ndone = 0;
  logic [7:0] got[$];
  test_fcs dut (.clk, .rst, .cmd_enabled_i(cmd_enabled), .cmd_attributes_i(attr),
    .cmd_dest_check_addr_i(dest), .rx_byte_i(fs_byte), .rx_new_byte_receive_i(fs_new),
    .rx_frame_receiving_i(fs_frame), .rx_frame_state_i(fs_state), .rx_index_i(fs_index),
    .rx_byte_o(ob), .rx_new_byte_o(on), .test_done_o(done), .delay_data_byte_o(dly),
    .swap_en_o(swap_en), .swap_data_o(swap_data));
  postprocess u_pp (.clk, .rst, .byte_i(ob), .new_byte_i(on), .frame_i(fs_frame), .delay_i(dly),
    .fix_checksum_i(1'b0), .swap_en_i(swap_en), .swap_data_i(swap_data), .discard_i(1'b0),
    .pre_mod_i(1'b0), .wr_en, .wr_byte, .wr_last, .wr_pre_mod, .frames_out);
  always @(posedge clk) if (!rst) begin
    if (wr_en) got.push_back(wr_byte);
    if (done) ndone++;
  end
  initial begin
    logic [7:0] f[$], g[$], pl[$], e[$];
    repeat (3) @(negedge clk); rst = 0;
    rand_bytes(50, pl);
    make_frame(48'h0200000000AA, 48'h0A0000000001, 16'h0800, pl, f);
    make_frame(48'h0200000000BB, 48'h0A0000000001, 16'h0800, pl, g);
    set_attr(0, 2); set_attr(2, 8'h11); set_attr(3, 8'h22); set_attr(4, 8'h33); set_attr(5, 8'h44);
    dest = 48'h0200000000AA;
    cmd_enabled = 1;
    got = {}; send(f);
    e = f[0:f.size()-5]; e = {e, 8'h11, 8'h22, 8'h33, 8'h44};

    `CHECK(got == e, "FCS replaced in a matching frame")
    got = {}; send(g);
    `CHECK(got == g, "other destination unchanged")
    `CHECK(ndone == 0, "not done after one matching frame")
    got = {}; send(f);
    `CHECK(got == e, "second matching frame")
    `CHECK(ndone == 1, "done after two matching frames")
    cmd_enabled = 0;
    got = {}; send(f);
    `CHECK(got == f, "unchanged when off")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
