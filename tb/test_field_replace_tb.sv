// test_field_replace_tb: one instance per field (destination, source, type,
// payload) on the same frame stream, each with its own attributes. Checks
// that exactly the addressed bytes are replaced, that the source test
// modifies only frames whose destination matches the conditional address,
// that `fix_checksum_o` and the four-byte delay follow the fix attribute,
// and that `test_done_o` comes after the given number of modified frames.
`timescale 1ns/1ps
module test_field_replace_tb;
  `include "tb_util.svh"
  `include "test_harness.svh"
  logic [ATTR_W-1:0] a [4];
  logic [47:0] dd [4];
  logic [7:0] ob [4];
  logic [3:0] on, done, fix;
  logic [3:0] dly [4];
  logic [7:0] got [4][$];
  int ndone [4];
  int nfix = 0, nfix_other = 0;
  always @(posedge clk) if (!rst && fs_new) begin
    if (fix[0] && dly[0] == 4) nfix++;
    if (fix[1] || dly[1] != 0) nfix_other++;
  end
  for (genvar g = 0; g < 4; g++) begin : g_dut
    test_field_replace #(.FIELD(g)) dut (.clk, .rst, .cmd_enabled_i(cmd_enabled),
      .cmd_attributes_i(a[g]), .cmd_dest_check_addr_i(dd[g]), .rx_byte_i(fs_byte),
      .rx_new_byte_receive_i(fs_new), .rx_frame_receiving_i(fs_frame),
      .rx_frame_state_i(fs_state), .rx_index_i(fs_index), .rx_byte_o(ob[g]),
      .rx_new_byte_o(on[g]), .test_done_o(done[g]), .fix_checksum_o(fix[g]),
      .delay_data_byte_o(dly[g]));
    always @(posedge clk) if (!rst) begin
      if (on[g]) got[g].push_back(ob[g]);
      if (done[g]) ndone[g]++;
    end
  end
  initial begin
    logic [7:0] f[$], pl[$], e[$];
    logic [47:0] da = 48'h02AABBCCDDEE;
    foreach (ndone[i]) ndone[i] = 0;
    // DST: amount 2, fix; SRC: conditional; TYPE; PAYLOAD offset 3, 4 bytes
    a[0] = '0; a[0][7:0] = 2; a[0][15:8] = 1; for (int i = 0; i < 6; i++) a[0][8*(2+i) +: 8] = 8'h10 + 8'(i);
    a[1] = '0; for (int i = 0; i < 6; i++) a[1][8*(2+i) +: 8] = 8'h20 + 8'(i);
    a[2] = '0; a[2][23:16] = 8'h88; a[2][31:24] = 8'hB5;
    a[3] = '0; a[3][63:56] = 8'd3; a[3][79:72] = 8'd4;
    for (int i = 0; i < 6; i++) a[3][8*(10+i) +: 8] = 8'hC0 + 8'(i);
    dd[0] = '0; dd[1] = da; dd[2] = '0; dd[3] = '0;
    repeat (3) @(negedge clk); rst = 0;
    rand_bytes(40, pl);
    make_frame(da, 48'h0A0000000001, 16'h0800, pl, f);
    cmd_enabled = 1;
    foreach (got[i]) got[i] = {};
    send(f);
    e = f; for (int i = 0; i < 6; i++) e[i] = 8'h10 + 8'(i);
    `CHECK(got[0] == e, "destination replaced")
    `CHECK(nfix == f.size() && nfix_other == 0, "fix attribute gives FCS fix and 4-byte delay")
    e = f; for (int i = 0; i < 6; i++) e[6+i] = 8'h20 + 8'(i);
    `CHECK(got[1] == e, "source replaced in a matching frame")
    e = f; e[12] = 8'h88; e[13] = 8'hB5;
    `CHECK(got[2] == e, "type replaced")
    e = f; for (int i = 0; i < 4; i++) e[14+3+i] = 8'hC0 + 8'(i);
    `CHECK(got[3] == e, "payload bytes 3..6 replaced")
    `CHECK(ndone[0] == 0 && ndone[1] == 1 && ndone[2] == 1 && ndone[3] == 1, "done after one frame")
    // a frame to another destination: the conditional source test leaves it
    make_frame(48'h02AABBCCDDEF, 48'h0A0000000001, 16'h0800, pl, f);
    foreach (got[i]) got[i] = {};
    send(f);
    `CHECK(got[1] == f, "source kept in a frame to another address")
    `CHECK(ndone[0] == 1, "destination test done after its second frame")
    cmd_enabled = 0;
    foreach (got[i]) got[i] = {};
    send(f);
    `CHECK(got[0] == f && got[3] == f, "no change when not enabled")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
