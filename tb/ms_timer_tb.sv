// ms_timer_tb: starts the millisecond timer with a reduced clock rate
// (CLK_HZ = 20 kHz, 20 clocks per millisecond) and checks that `done` rises
// exactly ms*20+2 clocks after `start` (one clock to load, one to finish), that `busy` covers that time, that a
// zero count ends at once, and that `stop` cancels a running timer.
`timescale 1ns/1ps
module ms_timer_tb;
  `include "tb_util.svh"
  localparam int unsigned HZ = 20_000, TICKS = HZ / 1000;
  logic clk = 0, rst = 1, start = 0, stop = 0, busy, done;
  logic [15:0] ms = 0;
  ms_timer #(.CLK_HZ(HZ)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk); rst = 0;
    `CHECK(!busy && !done, "idle after reset")
    for (int t = 0; t < 6; t++) begin
      ms = 16'(t == 0 ? 0 : $urandom_range(1, 40));
      start = 1; @(negedge clk); start = 0; n = 1;
      while (!done && n < 100000) begin
        if (!busy) break;
        @(negedge clk); n++;
      end
      `CHECK(done, "done raised")
      `CHECK(n == int'(ms) * TICKS + 2, $sformatf("length %0d for %0d ms", n, ms))
      @(negedge clk);
      `CHECK(done, "done held")
    end
    ms = 16'd50; start = 1; @(negedge clk); start = 0;
    repeat (100) @(negedge clk);
    `CHECK(busy && !done, "running")
    stop = 1; @(negedge clk); stop = 0;
    `CHECK(!busy && !done, "stopped")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
