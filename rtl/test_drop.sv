// test_drop: drop frames test.
//
// While armed, the frame is removed from the path by asking post-processing
// to discard it. Without a conditional address the discard is requested on
// the first byte. With one, the frame is delayed six bytes in
// post-processing so that the destination can be compared completely; the
// discard comes with the sixth byte, only on a match, before any byte has
// left the delay line, and a non-matching frame is sent unchanged.
// Attribute byte 0 is the number of frames to drop (0 counts as 1);
// `test_done_o` pulses after the last of them. The six-byte delay for the
// conditional case follows the tester; the one-byte frame count is this
// design's reading of the command table.
module test_drop (
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
  output logic [3:0]  delay_data_byte_o,
  output logic        discard_o
);
  import eth_pkg::*;
`include "test_frame_count.svh"
  logic [7:0] amount;
  assign amount = (cmd_attributes_i[7:0] == 0) ? 8'd1 : cmd_attributes_i[7:0];

  logic dropping;
  assign rx_byte_o         = rx_byte_i;
  assign rx_new_byte_o     = rx_new_byte_receive_i;
  assign delay_data_byte_o = (armed_now && cond) ? 4'd6 : 4'd0;
  assign discard_o = armed_now && rx_new_byte_receive_i && rx_frame_receiving_i &&
                     (cond ? (rx_index_i == 16'd5 && match && dst_byte_ok) : start);

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame <= 1'b0; armed <= 1'b0; match <= 1'b1; done_cnt <= '0; test_done_o <= 1'b0;
      dropping <= 1'b0;
    end else begin
      test_done_o <= 1'b0;
      if (!cmd_enabled_i) done_cnt <= '0;
      if (start) begin in_frame <= 1'b1; armed <= cmd_enabled_i; match <= 1'b1; end
      if (rx_new_byte_receive_i && rx_frame_receiving_i && rx_frame_state_i == FS_DST && !dst_byte_ok)
        match <= 1'b0;
      if (discard_o) dropping <= 1'b1;
      if (frame_end) begin
        in_frame <= 1'b0; armed <= 1'b0; dropping <= 1'b0;
        if (dropping && cmd_enabled_i) begin
          if (done_cnt + 1'b1 >= amount) begin test_done_o <= 1'b1; done_cnt <= '0; end
          else done_cnt <= done_cnt + 1'b1;
        end
      end
    end
  end
endmodule
