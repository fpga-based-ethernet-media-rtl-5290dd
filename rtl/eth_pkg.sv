// eth_pkg: types and constants shared by the Ethernet media level tester.
//
// The tester sits on an Ethernet link between two devices, forwards frames in
// both directions and, on command from a control PC, modifies, drops, delays,
// reorders or injects frames. This package holds what several modules agree
// on: the per-byte frame state produced by the frame state handler, the test
// identifiers carried in control commands, the command field sizes and the
// Ethernet constants.
//
// The command layout (9-byte main ID "/ETHTEST/", 1-byte test ID, '/' marks,
// direction byte, 6-byte conditional MAC) follows the control protocol of the
// tester. The numeric test ID values are this design's own: the protocol only
// says they are enumerated in the range 1-255.
package eth_pkg;

  // ---- Ethernet constants -------------------------------------------------
  localparam logic [3:0]  PREAMBLE_NIBBLE = 4'h5;   // 0101 on TXD[3:0]
  localparam logic [3:0]  SFD_NIBBLE      = 4'hD;   // 1101, second nibble of 0xD5
  localparam int unsigned PREAMBLE_NIBBLES_STD = 15; // plus one SFD nibble
  localparam int unsigned IPG_NIBBLES_STD = 24;      // 96 bit times
  localparam logic [31:0] CRC_RESIDUE     = 32'hDEBB20E3;  // CRC register after a frame and its own FCS

  // ---- Frame state of the byte presently on the receive bus --------------
  typedef enum logic [2:0] {
    FS_IDLE    = 3'd0,
    FS_DST     = 3'd1,   // bytes 0..5
    FS_SRC     = 3'd2,   // bytes 6..11
    FS_TYPE    = 3'd3,   // bytes 12..13
    FS_PAYLOAD = 3'd4    // byte 14 onward (the FCS is not known until the end)
  } frame_state_e;

  // ---- Control protocol ---------------------------------------------------
  localparam int unsigned MAIN_ID_LEN = 9;
  localparam logic [8*MAIN_ID_LEN-1:0] MAIN_ID = "/ETHTEST/";
  localparam logic [7:0]  PUNCT       = "/";
  localparam int unsigned ATTR_BYTES  = 16;          // see instr_decode
  localparam int unsigned ATTR_W      = 8*ATTR_BYTES;

  typedef enum logic [7:0] {
    T_NONE       = 8'd0,
    T_INIT       = 8'd1,   // address setting
    T_DROP       = 8'd2,
    T_INVERT_BIT = 8'd3,
    T_PREAMBLE   = 8'd4,
    T_DST_MAC    = 8'd5,
    T_SRC_MAC    = 8'd6,
    T_ETHERTYPE  = 8'd7,
    T_PAYLOAD    = 8'd8,
    T_FCS        = 8'd9,
    T_IPG        = 8'd10,
    T_CUSTOM     = 8'd11,
    T_SWAP       = 8'd12,
    T_DELAY_N    = 8'd13,
    T_DELAY_ALL  = 8'd14,
    T_DOS_BLOCK  = 8'd15,
    T_DOS_ALLOW  = 8'd16,
    T_DIRECTION  = 8'd17   // direction change only
  } test_id_e;

  // Direction byte of a command.
  localparam logic [7:0] DIR_1_TO_2 = 8'd1;
  localparam logic [7:0] DIR_2_TO_1 = 8'd2;

  // Number of attribute bytes after the conditional-address section, per
  // test. Zero means "frame data follows until the end of the UDP data".
  function automatic int unsigned attr_len(input logic [7:0] id);
    case (id)
      T_DROP:       return 1;
      T_INVERT_BIT: return 4;
      T_PREAMBLE:   return 3;
      T_DST_MAC,
      T_SRC_MAC:    return 8;
      T_ETHERTYPE:  return 4;
      T_PAYLOAD:    return 16;
      T_FCS:        return 6;
      T_IPG:        return 1;
      T_SWAP:       return 1;
      T_DELAY_N:    return 3;
      T_DELAY_ALL:  return 2;
      T_DOS_BLOCK,
      T_DOS_ALLOW:  return 2;  // then the frame
      default:      return 0;
    endcase
  endfunction

  // Tests whose command carries a frame to be written to memory.
  function automatic logic carries_frame(input logic [7:0] id);
    return (id == T_CUSTOM) || (id == T_DOS_BLOCK) || (id == T_DOS_ALLOW);
  endfunction

  function automatic logic known_test(input logic [7:0] id);
    return (id >= T_DROP) && (id <= T_DIRECTION);
  endfunction

endpackage
