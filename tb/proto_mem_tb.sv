// proto_mem_tb: writes random bytes to every address of the protocol memory
// and reads them back in random order, checking the one-clock read latency.
`timescale 1ns/1ps
module proto_mem_tb;
  `include "tb_util.svh"
  logic clk = 0, we = 0;
  logic [5:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [64];
  proto_mem dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 200; t++) begin
      addr = 6'($urandom); @(negedge clk);
      `CHECK(rdata == model[addr], "read back")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
