// test_preamble: preamble and start frame delimiter test.
//
// The preamble is generated by the transmitter, not received, so this test
// passes no modified bytes: it marks the frames it acts on with `pre_mod_o`
// (carried to the transmitter with the frame's first byte) and holds the
// preamble length and SFD choice on `pre_nibbles_o`/`sfd_en_o` until the
// next command. Attributes: byte 0 amount of frames, byte 1 preamble length
// in nibbles (0-38; larger values are clamped to 38), byte 2 non-zero to send
// a preamble nibble in place of the SFD. There is no conditional variant:
// the preamble precedes the destination address and checking it would need
// the frame delayed. `test_done_o` pulses after `amount` frames. Range,
// nibble resolution and the missing conditional variant follow the tester.
module test_preamble (
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
  output logic        pre_mod_o,
  output logic [5:0]  pre_nibbles_o,
  output logic        sfd_en_o
);
  import eth_pkg::*;
`include "test_frame_count.svh"
  logic [7:0] amount;
  assign amount = (cmd_attributes_i[7:0] == 0) ? 8'd1 : cmd_attributes_i[7:0];

  assign rx_byte_o     = rx_byte_i;
  assign rx_new_byte_o = rx_new_byte_receive_i;
  assign pre_mod_o     = armed_now && rx_frame_receiving_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame <= 1'b0; armed <= 1'b0; match <= 1'b1; done_cnt <= '0; test_done_o <= 1'b0;
      pre_nibbles_o <= 6'd15; sfd_en_o <= 1'b1;
    end else begin
      test_done_o <= 1'b0;
      if (!cmd_enabled_i) done_cnt <= '0;
      if (cmd_enabled_i) begin
        pre_nibbles_o <= (cmd_attributes_i[15:8] > 8'd38) ? 6'd38 : cmd_attributes_i[13:8];
        sfd_en_o      <= cmd_attributes_i[23:16] == 0;
      end
      if (start) begin in_frame <= 1'b1; armed <= cmd_enabled_i; match <= 1'b1; end
      if (frame_end) begin
        in_frame <= 1'b0; armed <= 1'b0;
        if (armed && cmd_enabled_i) begin
          if (done_cnt + 1'b1 >= amount) begin test_done_o <= 1'b1; done_cnt <= '0; end
          else done_cnt <= done_cnt + 1'b1;
        end
      end
    end
  end
endmodule
