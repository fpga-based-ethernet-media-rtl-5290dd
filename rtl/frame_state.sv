// frame_state: frame state handler of an Ethernet modifier.
//
// Every test block needs to know where in the frame the byte on the bus
// lies. Rather than each test counting for itself, this one block registers
// the byte stream once and tags each byte with its field (destination MAC,
// source MAC, type/length, payload) and its index from the first byte after
// the SFD. The FCS is not tagged: its place is known only when the frame has
// ended, which post-processing handles.
//
// All outputs are the inputs delayed by one clock, plus `state_o` and
// `index_o` describing that same byte. The one-clock register stage and the
// sharing among tests follow the tester; the 16-bit index is this design's.
module frame_state (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  byte_i,
  input  logic        new_byte_i,
  input  logic        frame_i,
  input  logic        last_i,
  output logic [7:0]  byte_o,
  output logic        new_byte_o,
  output logic        frame_o,
  output logic        last_o,
  output eth_pkg::frame_state_e state_o,
  output logic [15:0] index_o
);
  import eth_pkg::*;
  logic [15:0] cnt;   // bytes of the current frame already seen

  function automatic frame_state_e field_of(input logic [15:0] i);
    if (i < 6)       return FS_DST;
    else if (i < 12) return FS_SRC;
    else if (i < 14) return FS_TYPE;
    else             return FS_PAYLOAD;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; byte_o <= '0; new_byte_o <= 1'b0; frame_o <= 1'b0;
      last_o <= 1'b0; state_o <= FS_IDLE; index_o <= '0;
    end else begin
      byte_o     <= byte_i;
      new_byte_o <= new_byte_i;
      frame_o    <= frame_i;
      last_o     <= last_i && new_byte_i;
      if (!frame_i) begin
        cnt     <= '0;
        state_o <= FS_IDLE;
      end else if (new_byte_i) begin
        state_o <= field_of(cnt);
        index_o <= cnt;
        cnt     <= (cnt == 16'hFFFF) ? cnt : cnt + 1'b1;
      end
    end
  end
endmodule
