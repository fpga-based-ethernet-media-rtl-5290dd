// async_fifo_tb: the asynchronous FIFO with unrelated write (10 ns) and read
// (13 ns) clocks, a small depth (AW = 4) and random enables on both sides.
// Checks order and content of every word against a queue model, that `full`
// stops writes at 16 words, and that `empty` and `wr_count` settle to the
// model after the pointers have crossed.
`timescale 1ns/1ps
module async_fifo_tb;
  `include "tb_util.svh"
  localparam int DW = 10, AW = 4;
  logic wr_clk = 0, rd_clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [DW-1:0] wr_data = 0, rd_data;
  logic [AW:0] wr_count;
  logic [DW-1:0] q[$];
  int n_wr = 0, n_rd = 0;
  bit saw_full = 0;
  async_fifo #(.DW(DW), .AW(AW)) dut (.wr_clk, .wr_rst(rst), .wr_en, .wr_data, .full, .wr_count,
    .rd_clk, .rd_rst(rst), .rd_en, .rd_data, .empty);
  always #5 wr_clk = ~wr_clk;
  always #6.5 rd_clk = ~rd_clk;
  initial begin : watchdog
    #2000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int wr_pct = 80, rd_pct = 30;
  always @(negedge wr_clk) if (!rst) begin
    wr_en   = ($urandom_range(0, 99) < wr_pct) && n_wr < 2000;
    wr_data = DW'($urandom);
  end
  always @(posedge wr_clk) if (!rst) begin
    if (full) saw_full = 1;
    if (wr_en && !full) begin q.push_back(wr_data); n_wr++; end
  end
  always @(negedge rd_clk) if (!rst) rd_en = ($urandom_range(0, 99) < rd_pct);
  always @(posedge rd_clk) if (!rst && rd_en && !empty) begin
    `CHECK(q.size() > 0, "read from a FIFO the model says is empty")
    if (q.size() > 0) begin
      `CHECK(rd_data == q[0], "word order and content")
      void'(q.pop_front());
    end
    n_rd++;
  end
  initial begin
    #100 rst = 0;
    wait (n_wr >= 1000);
    `CHECK(saw_full, "FIFO filled up with a slow reader")
    rd_pct = 90; wr_pct = 20;
    wait (n_wr >= 2000);
    #2000;
    @(posedge wr_clk);
    `CHECK(empty && q.size() == 0, "drained")
    `CHECK(wr_count == 0, "write count back to zero")
    `CHECK(n_rd == 2000, "all words read")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
