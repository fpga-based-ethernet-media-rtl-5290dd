// test_fcs: frame check sequence test.
//
// The FCS is the last four bytes of a frame, and the end of a frame is known
// only once it has passed. So this test does not touch bytes itself: while
// armed it asks post-processing for a four-byte delay and for the delayed
// last four bytes to be swapped with the user's value. Attributes: amount of
// frames (byte 0), fix-FCS flag (byte 1, meaningless here and ignored), new
// FCS (bytes 2-5, in the order they are sent). With a non-zero conditional
// address the swap is requested only when the destination matched, which is
// known long before the end. `test_done_o` pulses after `amount` frames.
// The delay-and-swap mechanism follows the tester; the ignored flag and the
// send-order byte layout are this design's reading of the command table.
module test_fcs (
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
  output logic        swap_en_o,
  output logic [31:0] swap_data_o
);
  import eth_pkg::*;
`include "test_frame_count.svh"
  logic [7:0] amount;
  assign amount = (cmd_attributes_i[7:0] == 0) ? 8'd1 : cmd_attributes_i[7:0];

  assign rx_byte_o         = rx_byte_i;
  assign rx_new_byte_o     = rx_new_byte_receive_i;
  assign delay_data_byte_o = armed_now ? 4'd4 : 4'd0;
  assign swap_data_o       = cmd_attributes_i[16 +: 32];
  assign swap_en_o         = armed && in_frame && (!cond || match) &&
                             rx_frame_state_i == FS_PAYLOAD;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame <= 1'b0; armed <= 1'b0; match <= 1'b1; done_cnt <= '0; test_done_o <= 1'b0;
    end else begin
      test_done_o <= 1'b0;
      if (!cmd_enabled_i) done_cnt <= '0;
      if (start) begin in_frame <= 1'b1; armed <= cmd_enabled_i; match <= 1'b1; end
      if (rx_new_byte_receive_i && rx_frame_receiving_i && rx_frame_state_i == FS_DST && !dst_byte_ok)
        match <= 1'b0;
      if (frame_end) begin
        in_frame <= 1'b0; armed <= 1'b0;
        if (armed && cmd_enabled_i && (!cond || match)) begin
          if (done_cnt + 1'b1 >= amount) begin test_done_o <= 1'b1; done_cnt <= '0; end
          else done_cnt <= done_cnt + 1'b1;
        end
      end
    end
  end
endmodule
