// Shared frame bookkeeping of the test blocks: `start` marks the first byte
// of a frame, `armed` says the test acts on the present frame, `match` holds
// the result of comparing the destination address with the conditional
// address so far, and `frame_end` marks the first clock after a frame.
// `count_done(acted)` counts a frame the test acted on and raises
// `test_done_o` after `amount` of them.
  logic       in_frame, armed, match;
  logic [7:0] done_cnt;
  logic       start, armed_now, frame_end, cond;
  logic       dst_byte_ok;
  assign start     = rx_new_byte_receive_i && rx_frame_receiving_i && !in_frame;
  assign armed_now = start ? cmd_enabled_i : armed;
  assign frame_end = in_frame && !rx_frame_receiving_i;
  assign cond      = cmd_dest_check_addr_i != '0;
  assign dst_byte_ok = rx_byte_i == cmd_dest_check_addr_i[8*(5 - int'(rx_index_i[2:0])) +: 8];
