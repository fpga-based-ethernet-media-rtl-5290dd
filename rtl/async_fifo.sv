// async_fifo: dual-clock first-in-first-out buffer.
//
// Data crosses between two unrelated clocks here. Each side keeps a binary
// pointer one bit wider than the address and publishes it in Gray code, so
// only one bit changes per step; the other side samples it through a two
// flip-flop synchronizer. Full and empty are computed from the local pointer
// and the synchronized remote one, so they are conservative: the writer may
// see full a little late to clear and the reader empty a little late to clear,
// never the reverse. `rd_data` shows the word at the head (first-word
// fall-through); `rd_en` pops it.
//
// The tester uses vendor-generated FIFOs for every clock crossing and names a
// custom Gray-code FIFO as their replacement; this is that replacement. Depth
// is 2**AW words. `wr_count` is the writer's view of the occupancy. Reset is
// asynchronous to both sides and must be applied with both clocks idle or
// long enough to reach both.
module async_fifo #(
  parameter int unsigned DW = 10,
  parameter int unsigned AW = 11
) (
  input  logic          wr_clk,
  input  logic          wr_rst,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,
  output logic [AW:0]   wr_count,
  input  logic          rd_clk,
  input  logic          rd_rst,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_s1, rgray_s2, wgray_s1, wgray_s2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end
  always_ff @(posedge wr_clk or posedge wr_rst) begin
    if (wr_rst) begin
      wbin <= '0; wgray <= '0; rgray_s1 <= '0; rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  assign full     = (wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});
  assign wr_count = wbin - gray2bin(rgray_s2);

  // read side
  always_ff @(posedge rd_clk or posedge rd_rst) begin
    if (rd_rst) begin
      rbin <= '0; rgray <= '0; wgray_s1 <= '0; wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
  assign empty   = (rgray == wgray_s2);
  assign rd_data = mem[rbin[AW-1:0]];
endmodule
