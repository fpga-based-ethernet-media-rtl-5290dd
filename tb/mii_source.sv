// mii_source: testbench model of a PHY's MII receive output. send() drives
// one frame on RXD/RX_DV: `pre` preamble nibbles 0x5, the SFD nibble 0xD,
// then the bytes low nibble first, one nibble per clock, followed by an idle
// gap of `gap` clocks. Signals change on the falling edge of the clock.
`timescale 1ns/1ps
module mii_source (
  input  logic       clk,
  output logic       dv,
  output logic       er,
  output logic [3:0] d
);
  int sent = 0;
  initial begin dv = 0; er = 0; d = 0; end
  task automatic send(input logic [7:0] b[$], input int pre = 15, input int gap = 24);
    @(negedge clk);
    dv = 1;
    for (int i = 0; i < pre; i++) begin d = 4'h5; @(negedge clk); end
    d = 4'hD; @(negedge clk);
    foreach (b[i]) begin
      d = b[i][3:0]; @(negedge clk);
      d = b[i][7:4]; @(negedge clk);
    end
    dv = 0; d = 0;
    sent++;
    repeat (gap) @(negedge clk);
  endtask
endmodule
