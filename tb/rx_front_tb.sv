// rx_front_tb: MII frames on a 25 MHz receive clock are carried into a
// slightly faster core clock (27 MHz). Checks each byte and its `last` flag
// against the sent frame, that byte strobes are at least PACE core clocks
// apart, and that `frame_o` stays high from the first byte to the last.
`timescale 1ns/1ps
module rx_front_tb;
  `include "tb_util.svh"
  logic rx_clk = 0, clk = 0, rst = 1, rx_dv, rx_er;
  logic [3:0] rxd;
  logic [7:0] byte_o;
  logic new_byte_o, frame_o, last_o, err_o;
  rx_front dut (.rx_clk, .rx_rst(rst), .rx_dv, .rx_er, .rxd, .clk, .rst, .byte_o,
                .new_byte_o, .frame_o, .last_o, .err_o);
  mii_source src (.clk(rx_clk), .dv(rx_dv), .er(rx_er), .d(rxd));
  always #20 rx_clk = ~rx_clk;
  always #18.5 clk = ~clk;
  initial begin : watchdog
    #5000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] got[$];
  int lasts = 0, since = 100, min_space = 100, frame_drop = 0;
  bit mid = 0;
  always @(posedge clk) if (!rst) begin
    since++;
    if (mid && !frame_o) frame_drop++;
    if (new_byte_o) begin
      got.push_back(byte_o);
      if (since < min_space) min_space = since;
      since = 0; mid = !last_o;
      if (last_o) lasts++;
    end
  end
  initial begin
    logic [7:0] f[$], all[$];
    repeat (5) @(posedge rx_clk); rst = 0;
    repeat (5) @(posedge rx_clk);
    for (int t = 0; t < 8; t++) begin
      rand_bytes($urandom_range(60, 300), f);
      all = {all, f};
      src.send(f, 15, 24);
    end
    repeat (50) @(posedge clk);
    `CHECK(got == all, "all bytes in order")
    `CHECK(lasts == 8, "one last flag per frame")
    `CHECK(min_space >= 2, $sformatf("byte strobes %0d clocks apart", min_space))
    `CHECK(frame_drop == 0, "frame signal continuous inside a frame")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
