// mem_fifos_tb: the memory FIFO against a DDR2 model with a 10-clock read
// latency, in a small word space (MEM_AW = 10) so that the circular address
// wraps. Writes random-length chunks (1 to 300 bytes) as the modifier does,
// a byte every two clocks, and reads them back in order with random
// acknowledge gaps. Checks every byte, `frame_ready` after each chunk,
// `mem_empty` at the end, `mem_full` once the space is nearly used, and
// that a read request made while the memory is empty waits for a chunk.
`timescale 1ns/1ps
module mem_fifos_tb;
  `include "tb_util.svh"
  localparam int AW = 10;
  logic clk = 0, rst = 1;
  logic wr_enable = 0, wr_new_byte = 0, rd_enable = 0, byte_ack = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic mem_full, data_available, frame_ready, mem_empty;
  logic mem_wr_cmd_en, mem_rd_cmd_en, mem_rd_data_valid;
  logic [AW-1:0] mem_wr_addr, mem_rd_addr;
  logic [31:0] mem_wr_data, mem_rd_data;
  mem_fifos #(.MEM_AW(AW), .FULL_MARGIN(128)) dut (.*);
  ddr2_mem_model #(.AW(AW)) mem (.clk, .wr_cmd_en(mem_wr_cmd_en), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .rd_cmd_en(mem_rd_cmd_en), .rd_addr(mem_rd_addr),
    .rd_data_valid(mem_rd_data_valid), .rd_data(mem_rd_data));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] chunks [$][$];
  bit saw_full = 0;
  always @(posedge clk) if (!rst && mem_full) saw_full = 1;

  task automatic write_chunk(input logic [7:0] c[$]);
    @(negedge clk); wr_enable = 1;
    foreach (c[i]) begin
      @(negedge clk); wr_new_byte = 1; wr_data = c[i];
      @(negedge clk); wr_new_byte = 0;
    end
    @(negedge clk); wr_enable = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic read_chunk(output logic [7:0] c[$]);
    int guard = 0;
    c = {};
    @(negedge clk); rd_enable = 1; @(negedge clk); rd_enable = 0;
    while (!frame_ready && guard < 20000) begin
      if (data_available && $urandom_range(0, 2) != 0) begin
        c.push_back(rd_data); byte_ack = 1; @(negedge clk); byte_ack = 0;
      end else @(negedge clk);
      guard++;
    end
  endtask

  initial begin
    logic [7:0] c[$], r[$];
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    `CHECK(mem_empty && !mem_full && !data_available, "empty after reset")
    // read request first, chunk written afterwards
    rand_bytes(37, c);
    fork
      read_chunk(r);
      begin repeat (50) @(negedge clk); write_chunk(c); end
    join
    `CHECK(r == c, "waiting read gets the later chunk")
    // several rounds that wrap the 1024-word space
    for (int round = 0; round < 6; round++) begin
      chunks = {};
      for (int k = 0; k < 6; k++) begin
        rand_bytes($urandom_range(1, 300), c);
        chunks.push_back(c);
        write_chunk(c);
      end
      `CHECK(!mem_empty, "not empty with chunks stored")
      foreach (chunks[k]) begin
        read_chunk(r);
        `CHECK(r == chunks[k], $sformatf("round %0d chunk %0d (%0d bytes)", round, k, chunks[k].size()))
      end
      repeat (5) @(negedge clk);
      `CHECK(mem_empty, "empty after reading all")
    end
    // fill until full
    while (!mem_full) begin rand_bytes(200, c); write_chunk(c); end
    `CHECK(saw_full, "full reported")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
