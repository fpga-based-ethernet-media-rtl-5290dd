// test_invert_bit: single bit error test.
//
// Simulates a transmission error by inverting one bit of a frame. The bit is
// given as a bit offset from a reference point: frame start (destination
// address), source address, type field or payload start. Bit 0 of a byte is
// its first bit on the wire, its least significant. Attributes: byte 0
// amount of frames, byte 1 reference (0 frame, 1 source, 2 type, 3 payload),
// bytes 2-3 bit offset (big-endian). There is no FCS fix for this test, as
// its purpose is a detectable transmission error; the conditional address is
// honoured for bits after the destination address. The inversion is
// combinational, adding no latency; `test_done_o` pulses after `amount`
// frames. The four reference points follow the tester; the attribute layout
// is this design's reading of a partly inconsistent command table.
module test_invert_bit (
  input  logic        clk,
  input  logic        rst,
  input  logic        cmd_enabled_i,
  input  logic [eth_pkg::ATTR_W-1:0] cmd_attributes_i,
  input  logic [47:0] cmd_dest_check_addr_i,
  input  logic [7:0]  rx_byte_i,
  input  logic        rx_new_byte_receive_i,
  input  logic        rx_frame_receiving_i,
  input  eth_pkg::frame_state_e rx_frame_state_i,
  input  logic [15:0] rx_index_i,
  output logic [7:0]  rx_byte_o,
  output logic        rx_new_byte_o,
  output logic        test_done_o,
  output logic [3:0]  delay_data_byte_o
);
  import eth_pkg::*;
`include "test_frame_count.svh"
  logic [7:0]  amount;
  logic [15:0] base, bitoff, target;
  assign amount = (cmd_attributes_i[7:0] == 0) ? 8'd1 : cmd_attributes_i[7:0];
  always_comb begin
    unique case (cmd_attributes_i[9:8])
      2'd0: base = 16'd0;
      2'd1: base = 16'd6;
      2'd2: base = 16'd12;
      default: base = 16'd14;
    endcase
  end
  assign bitoff = {cmd_attributes_i[23:16], cmd_attributes_i[31:24]};
  assign target = base + (bitoff >> 3);

  logic hit;
  assign hit = armed_now && rx_new_byte_receive_i && rx_frame_receiving_i &&
               rx_index_i == target && (!cond || match || rx_index_i < 16'd6);
  assign rx_byte_o         = hit ? rx_byte_i ^ (8'd1 << bitoff[2:0]) : rx_byte_i;
  assign rx_new_byte_o     = rx_new_byte_receive_i;
  assign delay_data_byte_o = 4'd0;

  logic flipped;
  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame <= 1'b0; armed <= 1'b0; match <= 1'b1; done_cnt <= '0; test_done_o <= 1'b0;
      flipped <= 1'b0;
    end else begin
      test_done_o <= 1'b0;
      if (!cmd_enabled_i) done_cnt <= '0;
      if (start) begin in_frame <= 1'b1; armed <= cmd_enabled_i; match <= 1'b1; end
      if (rx_new_byte_receive_i && rx_frame_receiving_i && rx_frame_state_i == FS_DST && !dst_byte_ok)
        match <= 1'b0;
      if (hit) flipped <= 1'b1;
      if (frame_end) begin
        in_frame <= 1'b0; armed <= 1'b0; flipped <= 1'b0;
        if (flipped && cmd_enabled_i) begin
          if (done_cnt + 1'b1 >= amount) begin test_done_o <= 1'b1; done_cnt <= '0; end
          else done_cnt <= done_cnt + 1'b1;
        end
      end
    end
  end
endmodule
