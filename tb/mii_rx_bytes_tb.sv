// mii_rx_bytes_tb: drives MII receive nibbles (preamble of random length,
// SFD, data low nibble first, random gaps) and checks every byte, the `last`
// flag on the final byte, one byte per two receive clocks inside a frame,
// and the error flag for RX_ER and for an odd number of data nibbles.
`timescale 1ns/1ps
module mii_rx_bytes_tb;
  `include "tb_util.svh"
  logic rx_clk = 0, rst = 1, rx_dv = 0, rx_er = 0;
  logic [3:0] rxd = 0;
  logic out_valid, out_last, out_err;
  logic [7:0] out_byte;
  mii_rx_bytes dut (.*);
  always #20 rx_clk = ~rx_clk;
  initial begin : watchdog
    repeat (200000) @(posedge rx_clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] got[$];
  int last_cnt = 0, err_cnt = 0, prev_t = -1, min_space = 1000;
  int cyc = 0;
  always @(posedge rx_clk) begin
    cyc++;
    if (out_valid) begin
      got.push_back(out_byte);
      if (prev_t >= 0 && !out_last && cyc - prev_t < min_space) min_space = cyc - prev_t;
      prev_t = cyc;
      if (out_last) begin last_cnt++; prev_t = -1; end
      if (out_err) err_cnt++;
    end
  end

  task automatic send(input logic [7:0] b[$], input bit er, input bit odd);
    int pre;
    pre = $urandom_range(3, 15);
    @(negedge rx_clk);
    rx_dv = 1;
    for (int i = 0; i < pre; i++) begin rxd = 4'h5; @(negedge rx_clk); end
    rxd = 4'hD; @(negedge rx_clk);
    foreach (b[i]) begin
      rxd = b[i][3:0]; rx_er = er && (i == 3); @(negedge rx_clk);
      rx_er = 0; rxd = b[i][7:4]; @(negedge rx_clk);
    end
    if (odd) begin rxd = 4'hA; @(negedge rx_clk); end
    rx_dv = 0; rxd = 0;
    repeat ($urandom_range(12, 30)) @(negedge rx_clk);
  endtask

  initial begin
    logic [7:0] b[$];
    repeat (3) @(negedge rx_clk); rst = 0;
    for (int t = 0; t < 10; t++) begin
      b = {};
      for (int i = 0; i < $urandom_range(20, 200); i++) b.push_back(8'($urandom));
      got = {};
      send(b, 0, 0);
      `CHECK(got == b, $sformatf("frame %0d bytes", t))
      `CHECK(last_cnt == t + 1, "one last flag per frame")
      `CHECK(err_cnt == 0, "no error flag")
    end
    `CHECK(min_space == 2, $sformatf("byte spacing %0d clocks", min_space))
    b = {8'h1, 8'h2, 8'h3, 8'h4, 8'h5, 8'h6}; got = {};
    send(b, 1, 0);
    `CHECK(err_cnt == 1, "RX_ER flagged on the last byte")
    send(b, 0, 1);
    `CHECK(err_cnt == 2, "odd nibble count flagged")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
