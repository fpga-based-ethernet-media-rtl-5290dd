// ddr2_mem_model: behavioural stand-in for the external DDR2 memory and its
// vendor controller, as seen through the simple word port of the memory
// FIFO. Writes are accepted every clock; each read command returns its word
// LAT clocks later, in order. Storage is a sparse associative array, so the
// full 2**AW-word address space can be used; unwritten words read as zero.
`timescale 1ns/1ps
module ddr2_mem_model #(
  parameter int AW  = 26,
  parameter int LAT = 10
) (
  input  logic          clk,
  input  logic          wr_cmd_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  input  logic          rd_cmd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_data_valid,
  output logic [31:0]   rd_data
);
  logic [31:0] mem [logic [AW-1:0]];
  logic        pv [LAT];
  logic [31:0] pd [LAT];
  int writes = 0, reads = 0;
  initial begin
    rd_data_valid = 0; rd_data = 0;
    for (int i = 0; i < LAT; i++) begin pv[i] = 0; pd[i] = 0; end
  end
  always @(posedge clk) begin
    rd_data_valid <= pv[LAT-1];
    rd_data       <= pd[LAT-1];
    for (int i = LAT - 1; i > 0; i--) begin pv[i] = pv[i-1]; pd[i] = pd[i-1]; end
    pv[0] = rd_cmd_en;
    pd[0] = mem.exists(rd_addr) ? mem[rd_addr] : 32'd0;
    if (rd_cmd_en) reads++;
    if (wr_cmd_en) begin mem[wr_addr] = wr_data; writes++; end
  end
endmodule
