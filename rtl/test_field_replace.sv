// test_field_replace: header and payload replacement tests.
//
// One parameterized test block covers four of the tester's data link layer
// tests, selected by FIELD:
//   0 destination MAC  - attributes: amount, fix FCS, 6-byte new address
//   1 source MAC       - attributes: amount, fix FCS, 6-byte new address
//   2 EtherType/length - attributes: amount, fix FCS, 2-byte new value
//   3 payload          - attributes: amount, fix FCS, 6-byte offset from
//                        payload start, 2-byte size, 6 bytes of new data
// Attribute byte j is cmd_attributes_i[8*j +: 8], in command order; multi-byte
// values are big-endian as sent, so a MAC address goes out in command order.
//
// While `cmd_enabled_i` is high, each frame that starts is armed. A non-zero
// `cmd_dest_check_addr_i` makes the change conditional: the destination bytes
// are compared as they pass and bytes after the destination are replaced only
// on a full match. Bytes are replaced combinationally on the way through
// (no added latency); with "fix FCS" set the block asks post-processing for a
// four-byte delay and a new FCS. After `amount` frames (0 counts as 1) have
// been modified, `test_done_o` pulses at the end of the frame.
// The field set, the attribute order and the 6-byte payload limit follow the
// tester's command tables; the destination test ignores the conditional
// address (replacing bytes before the address is known would need the
// postprocess swap for the first bytes, which the tester also left out), a
// choice of this design.
module test_field_replace #(
  parameter int unsigned FIELD = 0
) (
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
  output logic        fix_checksum_o,
  output logic [3:0]  delay_data_byte_o
);
  import eth_pkg::*;

  function automatic logic [7:0] attr_b(input int j);
    return cmd_attributes_i[8*j +: 8];
  endfunction

  logic       in_frame, armed, match, mod_seen;
  logic [7:0] done_cnt;
  logic [7:0] amount;
  logic       fix;
  logic [15:0] pay_off;
  logic [7:0]  pay_size;
  logic        cond;

  assign amount   = (attr_b(0) == 0) ? 8'd1 : attr_b(0);
  assign fix      = attr_b(1) != 0;
  assign pay_off  = {attr_b(6), attr_b(7)};
  assign pay_size = (attr_b(9) > 8'd6) ? 8'd6 : attr_b(9);
  assign cond     = (FIELD != 0) && (cmd_dest_check_addr_i != '0);

  logic        start;       // first byte of a frame
  logic        armed_now;
  assign start     = rx_new_byte_receive_i && rx_frame_receiving_i && !in_frame;
  assign armed_now = start ? cmd_enabled_i : armed;

  // replacement for the current byte
  logic        hit;
  logic [7:0]  new_b;
  logic [15:0] rel;
  always_comb begin
    hit = 1'b0; new_b = rx_byte_i; rel = '0;
    unique case (FIELD)
      0: if (rx_frame_state_i == FS_DST) begin
           hit = 1'b1; new_b = attr_b(2 + int'(rx_index_i[2:0]));
         end
      1: if (rx_frame_state_i == FS_SRC) begin
           rel = rx_index_i - 16'd6;
           hit = 1'b1; new_b = attr_b(2 + int'(rel[2:0]));
         end
      2: if (rx_frame_state_i == FS_TYPE) begin
           hit = 1'b1; new_b = attr_b(2 + int'(rx_index_i[0]));
         end
      default: if (rx_frame_state_i == FS_PAYLOAD) begin
           rel = rx_index_i - 16'd14 - pay_off;
           if (rx_index_i >= 16'd14 + pay_off && rel < {8'd0, pay_size}) begin
             hit = 1'b1; new_b = attr_b(10 + int'(rel[2:0]));
           end
         end
    endcase
  end

  logic do_mod;
  assign do_mod = armed_now && rx_new_byte_receive_i && hit && (!cond || match);
  assign rx_byte_o       = do_mod ? new_b : rx_byte_i;
  assign rx_new_byte_o   = rx_new_byte_receive_i;
  assign fix_checksum_o  = armed_now && fix;
  assign delay_data_byte_o = (armed_now && fix) ? 4'd4 : 4'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame <= 1'b0; armed <= 1'b0; match <= 1'b1; mod_seen <= 1'b0;
      done_cnt <= '0; test_done_o <= 1'b0;
    end else begin
      test_done_o <= 1'b0;
      if (!cmd_enabled_i) done_cnt <= '0;
      if (start) begin
        in_frame <= 1'b1; armed <= cmd_enabled_i; match <= 1'b1; mod_seen <= 1'b0;
      end
      if (rx_new_byte_receive_i && rx_frame_receiving_i) begin
        if (rx_frame_state_i == FS_DST &&
            rx_byte_i != cmd_dest_check_addr_i[8*(5 - int'(rx_index_i[2:0])) +: 8])
          match <= 1'b0;
        if (do_mod) mod_seen <= 1'b1;
      end
      if (in_frame && !rx_frame_receiving_i) begin
        in_frame <= 1'b0;
        armed    <= 1'b0;
        if (armed && mod_seen && cmd_enabled_i) begin
          if (done_cnt + 1'b1 >= amount) begin
            test_done_o <= 1'b1; done_cnt <= '0;
          end else done_cnt <= done_cnt + 1'b1;
        end
      end
    end
  end
endmodule
