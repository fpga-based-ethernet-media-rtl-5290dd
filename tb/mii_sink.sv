// mii_sink: testbench model of a PHY's MII transmit input. It records every
// TX_EN burst: the bytes after the SFD (low nibble first), the number of
// preamble nibbles before the first non-0x5 nibble, whether an SFD 0xD was
// seen, the idle clocks before the burst and whether TX_ER was raised.
// frames[i] holds the bytes including the FCS; `count` is the number of
// complete bursts.
`timescale 1ns/1ps
module mii_sink (
  input logic       clk,
  input logic       rst,
  input logic       en,
  input logic       er,
  input logic [3:0] d
);
  logic [7:0] frames [$][$];
  int pre_len[$], gap_before[$];
  bit sfd_seen[$], err_seen[$];
  int count = 0, gap = 0;
  logic [3:0] nib[$];
  bit in_burst = 0, e = 0;

  function automatic void decode();
    int i = 0;
    logic [7:0] b[$];
    while (i < nib.size() && nib[i] == 4'h5) i++;
    pre_len.push_back(i);
    sfd_seen.push_back(i < nib.size() && nib[i] == 4'hD);
    if (i < nib.size() && nib[i] == 4'hD) i++;
    for (; i + 1 < nib.size(); i += 2) b.push_back({nib[i+1], nib[i]});
    frames.push_back(b);
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      nib = {}; in_burst = 0; gap = 0;
    end else if (en) begin
      if (!in_burst) begin gap_before.push_back(gap); e = 0; end
      in_burst = 1; nib.push_back(d); if (er) e = 1;
    end else begin
      if (in_burst) begin
        decode(); err_seen.push_back(e); count++; nib = {}; gap = 0;
      end
      in_burst = 0; gap++;
    end
  end
endmodule
