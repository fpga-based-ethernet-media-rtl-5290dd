// frame_state_tb: drives a frame byte stream and checks that each byte comes
// out one clock later tagged with its field (destination 0-5, source 6-11,
// type 12-13, payload from 14) and its index, and that the state returns to
// idle between frames.
`timescale 1ns/1ps
module frame_state_tb;
  `include "tb_util.svh"
  import eth_pkg::*;
  logic clk = 0, rst = 1, new_byte_i = 0, frame_i = 0, last_i = 0;
  logic [7:0] byte_i = 0, byte_o;
  logic new_byte_o, frame_o, last_o;
  frame_state_e state_o;
  logic [15:0] index_o;
  frame_state dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int idx = 0;
  logic [7:0] sent[$];
  always @(posedge clk) if (!rst && new_byte_o) begin
    frame_state_e e;
    e = idx < 6 ? FS_DST : idx < 12 ? FS_SRC : idx < 14 ? FS_TYPE : FS_PAYLOAD;
    `CHECK(state_o == e, $sformatf("field of byte %0d", idx))
    `CHECK(index_o == 16'(idx), "index")
    `CHECK(byte_o == sent[idx], "byte")
    `CHECK(last_o == (idx == sent.size() - 1), "last")
    idx++;
  end
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 3; t++) begin
      rand_bytes($urandom_range(20, 80), sent); idx = 0;
      foreach (sent[i]) begin
        @(negedge clk); frame_i = 1; new_byte_i = 1; byte_i = sent[i]; last_i = (i == sent.size() - 1);
        @(negedge clk); new_byte_i = 0; last_i = 0;
      end
      @(negedge clk); frame_i = 0;
      repeat (3) @(negedge clk);
      `CHECK(state_o == FS_IDLE, "idle between frames")
      `CHECK(idx == sent.size(), "all bytes seen")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
