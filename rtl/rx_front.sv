// rx_front: receive front end of one Ethernet port.
//
// Bytes assembled by mii_rx_bytes in the PHY's RX_CLK domain are written,
// with their end-of-frame and error flags, to an async_fifo and read out in
// the core clock domain, where the modifiers, the memory FIFOs and the
// command path all run. The tester does the same for its command port, where
// a receive FIFO carries the bytes into the common clock.
//
// Output stream (core clock): `byte_o` with a one-clock `new_byte_o` strobe,
// at most one byte every PACE clocks so that the downstream sees the pacing
// of the wire (PACE=2 matches a 25 MHz core clock and 100 Mb/s);
// `frame_o` is high from the first byte's strobe through the last byte's
// strobe, and `last_o`/`err_o` accompany the last byte. The FIFO depth
// (2**AW bytes) is this design's choice; the path adds roughly five core
// clocks of synchronizer latency.
module rx_front #(
  parameter int unsigned AW   = 6,
  parameter int unsigned PACE = 2
) (
  input  logic       rx_clk,
  input  logic       rx_rst,
  input  logic       rx_dv,
  input  logic       rx_er,
  input  logic [3:0] rxd,
  input  logic       clk,
  input  logic       rst,
  output logic [7:0] byte_o,
  output logic       new_byte_o,
  output logic       frame_o,
  output logic       last_o,
  output logic       err_o
);
  logic       v, l, e;
  logic [7:0] b;
  logic [9:0] rd_data;
  logic       empty, full, pop;
  logic [AW:0] cnt_unused;
  logic [$clog2(PACE+1)-1:0] pace_cnt;

  mii_rx_bytes u_rx (
    .rx_clk, .rst(rx_rst), .rx_dv, .rx_er, .rxd,
    .out_valid(v), .out_byte(b), .out_last(l), .out_err(e)
  );

  async_fifo #(.DW(10), .AW(AW)) u_fifo (
    .wr_clk(rx_clk), .wr_rst(rx_rst), .wr_en(v), .wr_data({e, l, b}),
    .full, .wr_count(cnt_unused),
    .rd_clk(clk), .rd_rst(rst), .rd_en(pop), .rd_data, .empty
  );

  assign pop = !empty && (pace_cnt == 0);

  logic in_frame;
  always_ff @(posedge clk) begin
    if (rst) begin
      pace_cnt <= '0; new_byte_o <= 1'b0; last_o <= 1'b0; err_o <= 1'b0;
      byte_o <= '0; in_frame <= 1'b0;
    end else begin
      if (pace_cnt != 0) pace_cnt <= pace_cnt - 1'b1;
      new_byte_o <= pop;
      if (pop) begin
        byte_o   <= rd_data[7:0];
        last_o   <= rd_data[8];
        err_o    <= rd_data[9];
        pace_cnt <= PACE[$bits(pace_cnt)-1:0] - 1'b1;
        in_frame <= !rd_data[8];
      end
    end
  end
  // high on every byte strobe of a frame and in the gaps between them
  assign frame_o = new_byte_o || in_frame;
endmodule
