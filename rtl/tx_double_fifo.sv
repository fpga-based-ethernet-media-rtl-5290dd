// tx_double_fifo: transmit block of one Ethernet port.
//
// Two frame FIFOs are used in turn: the writer fills one with a frame and
// switches to the other after the frame's last byte, so the next frame can be
// stored while the previous one is still being clocked out. The reader (the
// MII transmitter, in the PHY's TX_CLK domain) takes frames from the FIFOs in
// the same alternating order. Both FIFOs are async_fifo instances, so this is
// also where data moves from the core clock into the transmit clock.
//
// Write side (core clock): `wr_en` with `wr_byte`, `wr_last` on the final
// byte, `wr_pre_mod` on the first byte to request the modified preamble.
// Status for flow control, as the test blocks use it: `fifo_full` (the FIFO
// being written is full), `fifo_available` (the FIFO the next frame will go
// to is completely empty, so a whole frame may be started), `fifo_empty` (both are empty).
// Depth 2**AW bytes per FIFO holds one maximum-length frame at the default.
// The two-FIFO structure follows the tester; the depth is this design's.
module tx_double_fifo #(
  parameter int unsigned AW = 11
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_en,
  input  logic [7:0] wr_byte,
  input  logic       wr_last,
  input  logic       wr_pre_mod,
  output logic       fifo_full,
  output logic       fifo_available,
  output logic       fifo_empty,
  input  logic       tx_clk,
  input  logic       tx_rst,
  input  logic [5:0] pre_nibbles,
  input  logic       sfd_en,
  input  logic [7:0] ipg_nibbles,
  output logic [3:0] txd,
  output logic       tx_en,
  output logic       tx_er
);
  logic       wsel, rsel;
  logic [1:0] full, empty, pop;
  logic [9:0] rdata [2];
  logic [AW:0] cnt [2];
  logic       tx_pop, busy;

  for (genvar i = 0; i < 2; i++) begin : g_fifo
    async_fifo #(.DW(10), .AW(AW)) u_fifo (
      .wr_clk(clk), .wr_rst(rst),
      .wr_en(wr_en && (wsel == 1'(i))), .wr_data({wr_pre_mod, wr_last, wr_byte}),
      .full(full[i]), .wr_count(cnt[i]),
      .rd_clk(tx_clk), .rd_rst(tx_rst), .rd_en(pop[i]), .rd_data(rdata[i]),
      .empty(empty[i])
    );
    assign pop[i] = tx_pop && (rsel == 1'(i));
  end

  always_ff @(posedge clk) begin
    if (rst) wsel <= 1'b0;
    else if (wr_en && wr_last && !full[wsel]) wsel <= ~wsel;
  end

  always_ff @(posedge tx_clk) begin
    if (tx_rst) rsel <= 1'b0;
    else if (tx_pop && rdata[rsel][8]) rsel <= ~rsel;
  end

  assign fifo_full      = full[wsel];
  assign fifo_available = (cnt[wsel] == 0);  // the FIFO the next frame goes to
  assign fifo_empty     = (cnt[0] == 0) && (cnt[1] == 0);

  mii_tx u_tx (
    .tx_clk, .rst(tx_rst), .fifo_data(rdata[rsel]), .fifo_empty(empty[rsel]),
    .fifo_pop(tx_pop), .pre_nibbles, .sfd_en, .ipg_nibbles,
    .txd, .tx_en, .tx_er, .busy
  );
endmodule
