// postprocess_tb: feeds frames as the modifier does (a byte every two clocks,
// `frame_i` high for the frame) and checks the bytes written to the transmit
// FIFO: plain forwarding with `last` on the final byte, forwarding with a
// byte delay, FCS recomputation over the (modified) frame, FCS replacement by
// given swap data (low byte first), discarding a frame, the preamble flag on
// the first byte only, and the frame counter. As in the modifier, FCS
// replacement is asked for together with a delay of at least four bytes, and
// a discard arrives while the bytes seen so far are still held back.
`timescale 1ns/1ps
module postprocess_tb;
  `include "tb_util.svh"
  logic clk = 0, rst = 1;
  logic [7:0] byte_i = 0;
  logic new_byte_i = 0, frame_i = 0, fix_checksum_i = 0, swap_en_i = 0, discard_i = 0, pre_mod_i = 0;
  logic [3:0] delay_i = 0;
  logic [31:0] swap_data_i = 0, frames_out;
  logic wr_en, wr_last, wr_pre_mod;
  logic [7:0] wr_byte;
  postprocess dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] got[$];
  int lasts = 0, pm = 0, pm_first = 0;
  always @(posedge clk) if (!rst && wr_en) begin
    if (wr_pre_mod) begin pm++; if (got.size() == 0) pm_first++; end
    got.push_back(wr_byte);
    if (wr_last) lasts++;
  end
  // send one frame; `ctl` is applied from byte `at` on
  task automatic send(input logic [7:0] f[$], input int at, input int ctl);
    foreach (f[i]) begin
      @(negedge clk);
      frame_i = 1; new_byte_i = 1; byte_i = f[i];
      if (i >= at) begin
        fix_checksum_i = ctl == 1; swap_en_i = ctl == 2; discard_i = ctl == 3 && i == at;
        pre_mod_i = ctl == 4;
      end
      @(negedge clk); new_byte_i = 0; discard_i = 0;
    end
    @(negedge clk); frame_i = 0; fix_checksum_i = 0; swap_en_i = 0; pre_mod_i = 0;
    repeat (30) @(negedge clk);
  endtask
  initial begin
    logic [7:0] f[$], pl[$], exp_q[$];
    logic [31:0] c;
    repeat (3) @(negedge clk); rst = 0;
    rand_bytes(50, pl); make_frame(48'h0A0B0C0D0E0F, 48'h112233445566, 16'h0800, pl, f);
    got = {}; send(f, 0, 0);
    `CHECK(got == f, "plain forwarding")
    `CHECK(lasts == 1 && frames_out == 1, "last flag and counter")
    delay_i = 5; got = {}; send(f, 0, 0); delay_i = 0;
    `CHECK(got == f, "forwarding with delay")
    // corrupt a payload byte, ask for a new FCS
    f[20] = ~f[20]; delay_i = 4; got = {}; send(f, 10, 1);
    exp_q = f[0:f.size()-5]; c = ref_crc(exp_q);
    for (int i = 0; i < 4; i++) exp_q.push_back(c[8*i +: 8]);
    `CHECK(got == exp_q, "FCS fixed")
    swap_data_i = 32'hA1B2C3D4; got = {}; send(f, 30, 2);
    exp_q = f[0:f.size()-5]; exp_q = {exp_q, 8'hD4, 8'hC3, 8'hB2, 8'hA1};
    `CHECK(got == exp_q, "FCS swapped")
    delay_i = 6; got = {}; send(f, 5, 3);
    `CHECK(got.size() == 0, "discarded at byte 5 with 6 bytes held")
    delay_i = 0; got = {}; send(f, 0, 3);
    `CHECK(got.size() == 0, "discarded at the first byte")
    `CHECK(frames_out == 4, "discards not counted")
    got = {}; pm = 0; pm_first = 0; send(f, 0, 4);
    `CHECK(pm == 1 && pm_first == 1, "preamble flag on the first byte only")
    `CHECK(got == f, "content with preamble flag")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
