// test_drop_tb: the frame-drop test in front of the post-processing stage.
// Checks that the given number of frames is dropped whole and the rest pass,
// and that with a conditional address only frames to that address are
// dropped (the frame is held back six bytes until the address is known).
`timescale 1ns/1ps
module test_drop_tb;
  `include "tb_util.svh"
  `include "test_harness.svh"
  logic [7:0] ob, wr_byte;
  logic on, done, discard, wr_en, wr_last, wr_pre_mod;
  logic [3:0] dly;
  logic [31:0] frames_out;
  int ndone = 0, nlast = 0;
  logic [7:0] got[$];
  test_drop dut (.clk, .rst, .cmd_enabled_i(cmd_enabled), .cmd_attributes_i(attr),
    .cmd_dest_check_addr_i(dest), .rx_byte_i(fs_byte), .rx_new_byte_receive_i(fs_new),
    .rx_frame_receiving_i(fs_frame), .rx_frame_state_i(fs_state), .rx_index_i(fs_index),
    .rx_byte_o(ob), .rx_new_byte_o(on), .test_done_o(done), .delay_data_byte_o(dly),
    .discard_o(discard));
  postprocess u_pp (.clk, .rst, .byte_i(ob), .new_byte_i(on), .frame_i(fs_frame), .delay_i(dly),
    .fix_checksum_i(1'b0), .swap_en_i(1'b0), .swap_data_i(32'd0), .discard_i(discard),
    .pre_mod_i(1'b0), .wr_en, .wr_byte, .wr_last, .wr_pre_mod, .frames_out);
  always @(posedge clk) if (!rst) begin
    if (wr_en) got.push_back(wr_byte);
    if (wr_en && wr_last) nlast++;
    if (done) ndone++;
  end
  initial begin
    logic [7:0] f[$], g[$], pl[$];
    repeat (3) @(negedge clk); rst = 0;
    rand_bytes(50, pl);
    make_frame(48'h0200000000AA, 48'h0A0000000001, 16'h0800, pl, f);
    make_frame(48'h0200000000BB, 48'h0A0000000001, 16'h0800, pl, g);
    set_attr(0, 2);
    cmd_enabled = 1;
    got = {}; send(f); send(g);
    `CHECK(got.size() == 0, "two frames dropped")
    `CHECK(ndone == 1, "done after two drops")
    cmd_enabled = 0;
    send(f);
    `CHECK(got == f, "next frame passes")
    dest = 48'h0200000000BB; set_attr(0, 1); cmd_enabled = 1;
    got = {}; send(f);
    `CHECK(got == f, "frame to another address passes")
    got = {}; send(g);
    `CHECK(got.size() == 0, "frame to the conditional address dropped")
    `CHECK(ndone == 2, "done after the conditional drop")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
