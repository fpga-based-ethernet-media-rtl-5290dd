// crc32_d8_tb: checks the byte-wide CRC-32 against the check value of the
// standard ("123456789" gives 0xCBF43926), against a bit-serial model on
// random frames, and that appending the FCS (low byte first) leaves the
// fixed Ethernet residue. One byte per clock is checked by feeding a byte on
// every clock.
`timescale 1ns/1ps
module crc32_d8_tb;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [7:0] data = 0;
  logic [31:0] crc, fcs;
  crc32_d8 dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [7:0] d[$]);
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    foreach (d[i]) begin en = 1; data = d[i]; @(negedge clk); end
    en = 0;
  endtask

  initial begin
    logic [7:0] q[$];
    repeat (3) @(negedge clk); rst = 0;
    q = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    run(q);
    `CHECK(fcs == 32'hCBF43926, "check value of 123456789")
    for (int t = 0; t < 20; t++) begin
      logic [31:0] r;
      q = {};
      for (int i = 0; i < 14 + $urandom_range(0, 100); i++) q.push_back(8'($urandom));
      run(q);
      r = ref_crc(q);
      `CHECK(fcs == r, "random frame against serial model")
      for (int k = 0; k < 4; k++) q.push_back(r[8*k +: 8]);
      run(q);
      `CHECK(crc == eth_pkg::CRC_RESIDUE, "residue after FCS")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
