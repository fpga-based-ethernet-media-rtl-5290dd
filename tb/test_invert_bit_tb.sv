// test_invert_bit_tb: checks that exactly one bit is inverted, at the bit
// offset counted from the chosen reference (frame start, source address,
// type field or payload), for several random offsets, and that done follows.
`timescale 1ns/1ps
module test_invert_bit_tb;
  `include "tb_util.svh"
  `include "test_harness.svh"
  logic [7:0] ob;
  logic on, done;
  logic [3:0] dly;
  int ndone = 0;
  logic [7:0] got[$];
  test_invert_bit dut (.clk, .rst, .cmd_enabled_i(cmd_enabled), .cmd_attributes_i(attr),
    .cmd_dest_check_addr_i(dest), .rx_byte_i(fs_byte), .rx_new_byte_receive_i(fs_new),
    .rx_frame_receiving_i(fs_frame), .rx_frame_state_i(fs_state), .rx_index_i(fs_index),
    .rx_byte_o(ob), .rx_new_byte_o(on), .test_done_o(done), .delay_data_byte_o(dly));
  always @(posedge clk) if (!rst) begin
    if (on) got.push_back(ob);
    if (done) ndone++;
  end
  initial begin
    logic [7:0] f[$], pl[$], e[$];
    int base [4] = '{0, 6, 12, 14};
    repeat (3) @(negedge clk); rst = 0;
    rand_bytes(60, pl);
    make_frame(48'h0200000000AA, 48'h0A0000000001, 16'h0800, pl, f);
    for (int t = 0; t < 8; t++) begin
      int ref_sel, off;
      ref_sel = t % 4; off = $urandom_range(0, 300);
      set_attr(0, 1); set_attr(1, 8'(ref_sel)); set_attr(2, 8'(off >> 8)); set_attr(3, 8'(off));
      cmd_enabled = 1;
      got = {}; send(f);
      cmd_enabled = 0;
      e = f; e[base[ref_sel] + off / 8][off % 8] = ~e[base[ref_sel] + off / 8][off % 8];
      `CHECK(got == e, $sformatf("bit %0d from reference %0d inverted", off, ref_sel))
      `CHECK(ndone == t + 1, "done after the frame")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
