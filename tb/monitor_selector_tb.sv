// monitor_selector_tb: two byte streams send frames at random times; an
// injecting source sends its frames when allowed. Checks that the output
// holds only whole frames, each equal to a frame of the selected stream or
// an injected frame, never interleaved; that every injected frame gets out;
// that frames of the unselected stream never appear; and that a change of
// the selection takes effect between frames.
`timescale 1ns/1ps
module monitor_selector_tb;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, sel = 0;
  logic a_wr_en = 0, a_last = 0, b_wr_en = 0, b_last = 0;
  logic inj_busy = 0, inj_wr_en = 0, inj_last = 0, inj_allowed;
  logic [7:0] a_byte = 0, b_byte = 0, inj_byte = 0, out_byte;
  logic out_wr_en, out_last;
  logic [31:0] frames_fwd;
  monitor_selector dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // frames are tagged: first byte = source id (0xA0 a, 0xB0 b, 0xC0 inj)
  logic [7:0] cur[$];
  int n_a = 0, n_b = 0, n_i = 0, bad = 0, inj_sent = 0;
  always @(posedge clk) if (!rst && out_wr_en) begin
    cur.push_back(out_byte);
    if (out_last) begin
      logic ok;
      ok = 1;
      foreach (cur[i]) if (i > 0 && cur[i] != cur[0] + 8'(i)) ok = 0;
      if (!ok) bad++;
      case (cur[0] & 8'hF0)
        8'hA0: n_a++;
        8'hB0: n_b++;
        8'hC0: n_i++;
        default: bad++;
      endcase
      cur = {};
    end
  end
  task automatic stream_a(input int n);
    repeat (n) begin
      int len = $urandom_range(3, 12);
      for (int i = 0; i < len; i++) begin
        @(negedge clk); a_wr_en = 1; a_byte = 8'hA0 + 8'(i); a_last = (i == len - 1);
        @(negedge clk); a_wr_en = 0; a_last = 0;
      end
      repeat ($urandom_range(0, 10)) @(negedge clk);
    end
  endtask
  task automatic stream_b(input int n);
    repeat (n) begin
      int len = $urandom_range(3, 12);
      for (int i = 0; i < len; i++) begin
        @(negedge clk); b_wr_en = 1; b_byte = 8'hB0 + 8'(i); b_last = (i == len - 1);
        @(negedge clk); b_wr_en = 0; b_last = 0;
      end
      repeat ($urandom_range(0, 10)) @(negedge clk);
    end
  endtask
  task automatic inject(input int n);
    repeat (n) begin
      repeat ($urandom_range(5, 40)) @(negedge clk);
      while (!inj_allowed) @(negedge clk);
      inj_busy = 1;
      @(negedge clk);
      for (int i = 0; i < 6; i++) begin
        inj_wr_en = 1; inj_byte = 8'hC0 + 8'(i); inj_last = (i == 5);
        @(negedge clk); inj_wr_en = 0; inj_last = 0;
      end
      inj_busy = 0; inj_sent++;
    end
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    fork stream_a(40); stream_b(40); inject(8); join
    repeat (5) @(negedge clk);
    `CHECK(bad == 0, "only whole, uninterleaved frames")
    `CHECK(n_b == 0, "unselected stream never forwarded")
    `CHECK(n_a > 0, "selected stream forwarded")
    `CHECK(n_i == inj_sent, "every injected frame sent")
    sel = 1; n_a = 0; n_b = 0;
    fork stream_a(20); stream_b(20); join
    repeat (5) @(negedge clk);
    `CHECK(n_a == 0 && n_b > 0 && bad == 0, "selection switched to stream b")
    `CHECK(frames_fwd > 0, "frame counter")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
