// mem_io_mux: shares the one memory FIFO between its three users.
//
// The memory FIFO has one write side and one read side. Three blocks use it:
// the instruction decoder, which writes the frame carried by a custom-frame or
// denial-of-service command, and the two Ethernet modifiers, which store and
// replay frames for the delay, swap and denial-of-service tests. Only one
// direction is under test at a time, so the selection is simple:
//   * write side: the decoder while it is writing a command frame
//     (`dec_active`), otherwise the modifier of the selected direction;
//   * read side: the modifier of the selected direction;
//   * status (data available, frame ready, empty, full): to the selected
//     modifier; the other modifier sees an empty, non-full memory with no
//     data, so that it never starts a read.
// The choice is combinational; `dir` changes only between tests. Sharing one
// memory between the directions follows the tester; the priority rule is this
// design's own.
module mem_io_mux (
  input  logic       dir,           // 0: modifier 1 (port 1 -> 2), 1: modifier 2
  input  logic       dec_active,
  input  logic       dec_wr_enable,
  input  logic       dec_wr_new_byte,
  input  logic [7:0] dec_wr_data,
  // modifier write/read requests, index 0 and 1
  input  logic [1:0] m_wr_enable,
  input  logic [1:0] m_wr_new_byte,
  input  logic [7:0] m_wr_data [2],
  input  logic [1:0] m_rd_enable,
  input  logic [1:0] m_rd_byte_ack,
  // status back to the modifiers
  output logic [1:0] m_data_available,
  output logic [1:0] m_frame_ready,
  output logic [1:0] m_empty,
  output logic [1:0] m_full,
  // memory FIFO
  output logic       wr_enable,
  output logic       wr_new_byte,
  output logic [7:0] wr_data,
  output logic       rd_enable,
  output logic       byte_ack,
  input  logic       data_available,
  input  logic       frame_ready,
  input  logic       mem_empty,
  input  logic       mem_full
);
  always_comb begin
    if (dec_active) begin
      wr_enable   = dec_wr_enable;
      wr_new_byte = dec_wr_new_byte;
      wr_data     = dec_wr_data;
    end else begin
      wr_enable   = m_wr_enable[dir];
      wr_new_byte = m_wr_new_byte[dir];
      wr_data     = m_wr_data[dir];
    end
    rd_enable = m_rd_enable[dir];
    byte_ack  = m_rd_byte_ack[dir];
    m_data_available = 2'b00;
    m_frame_ready    = 2'b00;
    m_empty          = 2'b11;
    m_full           = 2'b00;
    m_data_available[dir] = data_available;
    m_frame_ready[dir]    = frame_ready;
    // while the decoder writes a command frame the memory is busy for others
    m_empty[dir]          = mem_empty && !dec_active;
    m_full[dir]           = mem_full || dec_active;
  end
endmodule
