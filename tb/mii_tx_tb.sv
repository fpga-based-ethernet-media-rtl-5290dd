// mii_tx_tb: the MII transmitter fed from a FIFO model. Sends frames with the
// standard preamble, with a modified preamble length and with the SFD
// replaced, back to back. Checks the nibble sequence on TXD (preamble, SFD,
// data low nibble first), that each frame keeps TX_EN high for exactly
// preamble + 1 + 2 x bytes clocks (100 Mbit/s: one nibble per 25 MHz clock),
// that the gap between back-to-back frames is the 24-nibble inter-packet gap,
// and that a FIFO underrun mid-frame raises TX_ER.
`timescale 1ns/1ps
module mii_tx_tb;
  `include "tb_util.svh"
  logic tx_clk = 0, rst = 1;
  logic [9:0] fifo_data;
  logic fifo_empty, fifo_pop, sfd_en = 1, tx_en, tx_er, busy;
  logic [5:0] pre_nibbles = 15;
  logic [7:0] ipg_nibbles = 24;
  logic [3:0] txd;
  logic [9:0] q[$];
  bit hold = 0;
  mii_tx dut (.*);
  always #20 tx_clk = ~tx_clk;
  assign fifo_empty = (q.size() == 0) || hold;
  assign fifo_data  = (q.size() == 0) ? 10'd0 : q[0];
  always @(posedge tx_clk) if (fifo_pop) void'(q.pop_front());
  initial begin : watchdog
    repeat (20000) @(posedge tx_clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // capture: nibbles of each TX_EN burst and the gap before it
  logic [3:0] nib[$];
  int gap = 0, last_gap = 0, bursts = 0, er_seen = 0;
  logic [3:0] frames_nib [$][$];
  int gaps[$];
  always @(posedge tx_clk) if (!rst) begin
    if (tx_er) er_seen++;
    if (tx_en) begin
      if (nib.size() == 0) begin gaps.push_back(gap); end
      nib.push_back(txd); gap = 0;
    end else begin
      if (nib.size() != 0) begin frames_nib.push_back(nib); nib = {}; bursts++; end
      gap++;
    end
  end

  task automatic push_frame(input int n, input bit mod, output logic [7:0] b[$]);
    b = {};
    for (int i = 0; i < n; i++) begin
      b.push_back(8'($urandom));
      q.push_back({mod, i == n - 1, b[i]});
    end
  endtask

  task automatic check_frame(input int idx, input int pre, input bit sfd, input logic [7:0] b[$]);
    logic [3:0] f[$];
    f = frames_nib[idx];
    `CHECK(f.size() == pre + 1 + 2 * b.size(), $sformatf("frame %0d length %0d nibbles", idx, f.size()))
    for (int i = 0; i < pre && i < f.size(); i++)
      `CHECK(f[i] == 4'h5, "preamble nibble")
    if (f.size() > pre) `CHECK(f[pre] == (sfd ? 4'hD : 4'h5), "SFD nibble")
    foreach (b[i]) if (f.size() > pre + 2 + 2 * i)
      `CHECK({f[pre + 2 + 2 * i], f[pre + 1 + 2 * i]} == b[i], "data byte, low nibble first")
  endtask

  initial begin
    logic [7:0] b0[$], b1[$], b2[$], b3[$];
    repeat (4) @(posedge tx_clk); rst = 0;
    push_frame(64, 0, b0);
    push_frame(100, 0, b1);
    wait (bursts == 2);
    check_frame(0, 15, 1, b0);
    check_frame(1, 15, 1, b1);
    `CHECK(gaps[1] == 24, $sformatf("inter-packet gap %0d nibbles", gaps[1]))
    // modified preamble: 7 nibbles, SFD replaced by a preamble nibble
    pre_nibbles = 7; sfd_en = 0;
    push_frame(60, 1, b2);
    wait (bursts == 3);
    check_frame(2, 7, 0, b2);
    // preamble settings without the modify flag are ignored
    push_frame(60, 0, b3);
    wait (bursts == 4);
    check_frame(3, 15, 1, b3);
    `CHECK(er_seen == 0, "no TX_ER without underrun")
    // underrun: only part of a frame is in the FIFO
    for (int i = 0; i < 10; i++) q.push_back({2'b00, 8'(i)});
    repeat (80) @(posedge tx_clk);
    `CHECK(er_seen > 0, "TX_ER on underrun")
    q.push_back({2'b01, 8'h55});
    repeat (40) @(posedge tx_clk);
    `CHECK(!busy, "back to idle after the last byte")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
