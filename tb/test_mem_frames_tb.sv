// test_mem_frames_tb: the memory tests with the memory FIFO, a DDR2 model and
// a reduced clock rate for the millisecond timer (CLK_HZ = 20 kHz, 20 clocks
// per millisecond). The transmit FIFO is taken as always ready. Checks:
//   swap      frames A, B, C with amount 2 leave as C, A, B;
//   delay N   one frame held for 20 ms while the next passes, then released;
//   delay all every frame held for 40 ms, then all leave in order, the first
//             not before 40 ms after it was stored;
//   custom    a frame written to memory beforehand is sent once;
//   DoS block the user frame is repeated back to back for 30 ms while
//             incoming frames are dropped, then the memory is empty;
//   IPG       a frame is held until the next one starts, then both leave
//             in order (the gap itself is set in the transmitter);
// and that each test reports done and leaves the memory empty.
`timescale 1ns/1ps
module test_mem_frames_tb;
  `include "tb_util.svh"
  import eth_pkg::*;
  localparam int HZ = 20_000, TPM = HZ / 1000, AW = 12;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cmd_enabled = 0;
  logic [7:0] test_sel = 0;
  logic [ATTR_W-1:0] attr = '0;
  logic [7:0] s_byte = 0;
  logic s_new = 0, s_frame = 0;
  logic [7:0] ob;
  logic on, ofr, done;
  // memory FIFO and model
  logic d_wr_en, d_wr_nb, d_rd_en, d_ack, t_wr_en = 0, t_wr_nb = 0;
  logic [7:0] d_wr_data, t_wr_data = 0, rd_data;
  logic mem_full, data_available, frame_ready, mem_empty;
  logic mwc, mrc, mrv;
  logic [AW-1:0] mwa, mra;
  logic [31:0] mwd, mrd;
  test_mem_frames #(.CLK_HZ(HZ)) dut (.clk, .rst, .cmd_enabled_i(cmd_enabled), .test_select_i(test_sel),
    .cmd_attributes_i(attr), .rx_byte_i(s_byte), .rx_new_byte_receive_i(s_new),
    .rx_frame_receiving_i(s_frame), .rx_byte_o(ob), .rx_new_byte_o(on), .rx_frame_o(ofr),
    .test_done_o(done), .tx_fifo_full_i(1'b0), .tx_fifo_available_i(1'b1), .tx_fifo_empty_i(1'b1),
    .mem_rd_data_i(rd_data), .mem_rd_data_available_i(data_available),
    .mem_rd_frame_ready_i(frame_ready), .mem_empty_i(mem_empty), .mem_full_i(mem_full),
    .mem_wr_enable_o(d_wr_en), .mem_wr_data_o(d_wr_data), .mem_wr_new_byte_o(d_wr_nb),
    .mem_rd_enable_o(d_rd_en), .mem_rd_byte_ack_o(d_ack));
  mem_fifos #(.MEM_AW(AW), .FULL_MARGIN(512)) u_mf (.clk, .rst, .wr_enable(d_wr_en | t_wr_en),
    .wr_new_byte(t_wr_en ? t_wr_nb : d_wr_nb), .wr_data(t_wr_en ? t_wr_data : d_wr_data),
    .mem_full, .rd_enable(d_rd_en), .rd_data, .byte_ack(d_ack), .data_available, .frame_ready,
    .mem_empty, .mem_wr_cmd_en(mwc), .mem_wr_addr(mwa), .mem_wr_data(mwd), .mem_rd_cmd_en(mrc),
    .mem_rd_addr(mra), .mem_rd_data_valid(mrv), .mem_rd_data(mrd));
  ddr2_mem_model #(.AW(AW)) u_mem (.clk, .wr_cmd_en(mwc), .wr_addr(mwa), .wr_data(mwd),
    .rd_cmd_en(mrc), .rd_addr(mra), .rd_data_valid(mrv), .rd_data(mrd));
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // output frames
  logic [7:0] outf [$][$];
  longint out_t [$];
  logic [7:0] cur[$];
  bit ofr_d = 0;
  longint cyc = 0;
  int ndone = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (on) cur.push_back(ob);
      if (ofr_d && !ofr && cur.size() > 0) begin outf.push_back(cur); out_t.push_back(cyc); cur = {}; end
      ofr_d <= ofr;
      if (done) ndone++;
    end
  end
  task automatic send(input logic [7:0] f[$]);
    foreach (f[i]) begin
      @(negedge clk); s_frame = 1; s_new = 1; s_byte = f[i];
      @(negedge clk); s_new = 0;
    end
    @(negedge clk); s_frame = 0;
    repeat (30) @(negedge clk);
  endtask
  task automatic start_test(input logic [7:0] id, input logic [7:0] b0, input logic [7:0] b1,
                            input logic [7:0] b2);
    attr = '0; attr[7:0] = b0; attr[15:8] = b1; attr[23:16] = b2;
    test_sel = id; outf = {}; out_t = {};
    @(negedge clk); cmd_enabled = 1;
  endtask
  task automatic wait_done(input int n);
    int g = 0;
    while (ndone < n && g < 100000) begin @(negedge clk); g++; end
    cmd_enabled = 0;
    repeat (40) @(negedge clk);
  endtask
  initial begin
    logic [7:0] fa[$], fb[$], fc[$], fu[$], pl[$];
    longint t0;
    repeat (3) @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);
    rand_bytes(40, pl); make_frame(48'h0200000000AA, 48'h0A01, 16'h0800, pl, fa);
    rand_bytes(50, pl); make_frame(48'h0200000000BB, 48'h0A02, 16'h0800, pl, fb);
    rand_bytes(60, pl); make_frame(48'h0200000000CC, 48'h0A03, 16'h0800, pl, fc);
    // swap
    start_test(T_SWAP, 8'd2, 8'd0, 8'd0);
    send(fa); send(fb); send(fc);
    wait_done(1);
    `CHECK(outf.size() == 3, $sformatf("swap: %0d frames out", outf.size()))
    if (outf.size() == 3) `CHECK(outf[0] == fc && outf[1] == fa && outf[2] == fb, "swap order C, A, B")
    `CHECK(mem_empty, "memory empty after swap")
    // delay N: one frame, 3 ms
    start_test(T_DELAY_N, 8'd1, 8'd0, 8'd20);
    t0 = cyc; send(fa); send(fb);
    wait_done(2);
    `CHECK(outf.size() == 2, "delay N: two frames out")
    if (outf.size() == 2) begin
      `CHECK(outf[0] == fb && outf[1] == fa, "delay N: held frame comes after the next")
      `CHECK(out_t[1] - t0 >= 20 * TPM, "delay N: held for 20 ms")
    end
    // delay all: 6 ms
    start_test(T_DELAY_ALL, 8'd0, 8'd40, 8'd0);
    t0 = cyc; send(fa); send(fb); send(fc);
    `CHECK(outf.size() == 0, "delay all: nothing out while timing")
    wait_done(3);
    `CHECK(outf.size() == 3, "delay all: three frames out")
    if (outf.size() == 3) begin
      `CHECK(outf[0] == fa && outf[1] == fb && outf[2] == fc, "delay all: order kept")
      `CHECK(out_t[0] - t0 >= 40 * TPM, "delay all: first frame after 40 ms")
    end
    // custom frame, written to memory beforehand
    rand_bytes(70, pl); make_frame(48'hFFFFFFFFFFFF, 48'h0A09, 16'h88B5, pl, fu);
    @(negedge clk); t_wr_en = 1;
    foreach (fu[i]) begin @(negedge clk); t_wr_nb = 1; t_wr_data = fu[i]; @(negedge clk); t_wr_nb = 0; end
    @(negedge clk); t_wr_en = 0; repeat (5) @(negedge clk);
    start_test(T_CUSTOM, 8'd0, 8'd0, 8'd0);
    wait_done(4);
    `CHECK(outf.size() == 1 && outf[0] == fu, "custom frame sent once")
    // DoS block for 5 ms
    @(negedge clk); t_wr_en = 1;
    foreach (fu[i]) begin @(negedge clk); t_wr_nb = 1; t_wr_data = fu[i]; @(negedge clk); t_wr_nb = 0; end
    @(negedge clk); t_wr_en = 0; repeat (5) @(negedge clk);
    start_test(T_DOS_BLOCK, 8'd0, 8'd30, 8'd0);
    send(fa);
    wait_done(5);
    begin
      int good = 0;
      foreach (outf[i]) if (outf[i] == fu) good++;
      `CHECK(outf.size() > 2 && good == outf.size(), $sformatf("DoS: %0d copies of the user frame", outf.size()))
    end
    `CHECK(mem_empty, "memory empty after DoS")
    // IPG: the first frame is held until the next one starts
    start_test(T_IPG, 8'd12, 8'd0, 8'd0);
    send(fa);
    `CHECK(outf.size() == 0, "ipg: first frame held")
    send(fb);
    wait_done(6);
    `CHECK(outf.size() == 2, "ipg: two frames out")
    if (outf.size() == 2) `CHECK(outf[0] == fa && outf[1] == fb, "ipg: order kept")
    `CHECK(mem_empty, "memory empty after ipg")
    `CHECK(ndone == 6, "every test reported done")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
