// tx_double_fifo_tb: writes frames one byte per core clock into the double
// FIFO and checks what the MII transmitter makes of them on a separate
// 25 MHz transmit clock: content, standard preamble and SFD, 24-nibble gaps
// between frames that were queued together, the available/empty status
// and the preamble modification flag carried with the bytes.
`timescale 1ns/1ps
module tx_double_fifo_tb;
  `include "tb_util.svh"
  logic clk = 0, tx_clk = 0, rst = 1;
  logic wr_en = 0, wr_last = 0, wr_pre_mod = 0;
  logic [7:0] wr_byte = 0;
  logic fifo_full, fifo_available, fifo_empty, tx_en, tx_er;
  logic [3:0] txd;
  logic [5:0] pre_nibbles = 15;
  logic sfd_en = 1;
  logic [7:0] ipg_nibbles = 24;
  tx_double_fifo #(.AW(9)) dut (.clk, .rst, .wr_en, .wr_byte, .wr_last, .wr_pre_mod, .fifo_full,
    .fifo_available, .fifo_empty, .tx_clk, .tx_rst(rst), .pre_nibbles, .sfd_en, .ipg_nibbles,
    .txd, .tx_en, .tx_er);
  mii_sink snk (.clk(tx_clk), .rst, .en(tx_en), .er(tx_er), .d(txd));
  always #15 clk = ~clk;
  always #20 tx_clk = ~tx_clk;
  initial begin : watchdog
    #5000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic put(input logic [7:0] f[$], input bit pm);
    foreach (f[i]) begin
      @(negedge clk); wr_en = 1; wr_byte = f[i]; wr_last = (i == f.size() - 1); wr_pre_mod = pm;
    end
    @(negedge clk); wr_en = 0; wr_last = 0; wr_pre_mod = 0;
  endtask
  initial begin
    logic [7:0] f[4][$];
    repeat (5) @(posedge tx_clk); rst = 0;
    repeat (5) @(posedge tx_clk);
    `CHECK(fifo_empty && fifo_available && !fifo_full, "empty after reset")
    for (int i = 0; i < 3; i++) rand_bytes($urandom_range(64, 200), f[i]);
    put(f[0], 0); put(f[1], 0);
    `CHECK(!fifo_empty, "not empty while frames wait")
    wait (snk.count == 2);
    `CHECK(snk.frames[0] == f[0] && snk.frames[1] == f[1], "two frames")
    `CHECK(snk.pre_len[0] == 15 && snk.sfd_seen[0], "standard preamble")
    `CHECK(snk.gap_before[1] == 24, $sformatf("gap %0d nibbles", snk.gap_before[1]))
    pre_nibbles = 5; sfd_en = 0;
    put(f[2], 1);
    wait (snk.count == 3);
    `CHECK(snk.frames[2] == f[2], "modified-preamble frame content")
    `CHECK(snk.pre_len[2] == 6 && !snk.sfd_seen[2], "5 preamble nibbles and SFD replaced")
    repeat (20) @(posedge clk);
    `CHECK(fifo_empty, "empty after sending")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
