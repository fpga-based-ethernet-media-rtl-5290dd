// mem_io_mux_tb: random stimulus on all inputs of the memory mux; every
// output is compared with the routing rule worked out here: the decoder
// writes while active, otherwise the selected modifier; reads and status
// belong to the selected modifier; the other one sees an idle memory.
`timescale 1ns/1ps
module mem_io_mux_tb;
  `include "tb_util.svh"
  logic dir, dec_active, dec_wr_enable, dec_wr_new_byte;
  logic [7:0] dec_wr_data;
  logic [1:0] m_wr_enable, m_wr_new_byte, m_rd_enable, m_rd_byte_ack;
  logic [7:0] m_wr_data [2];
  logic [1:0] m_data_available, m_frame_ready, m_empty, m_full;
  logic wr_enable, wr_new_byte, rd_enable, byte_ack;
  logic [7:0] wr_data;
  logic data_available, frame_ready, mem_empty, mem_full;
  mem_io_mux dut (.*);
  initial begin
    for (int t = 0; t < 2000; t++) begin
      int s, o;
      {dir, dec_active, dec_wr_enable, dec_wr_new_byte} = 4'($urandom);
      dec_wr_data = 8'($urandom);
      {m_wr_enable, m_wr_new_byte, m_rd_enable, m_rd_byte_ack} = 8'($urandom);
      m_wr_data[0] = 8'($urandom); m_wr_data[1] = 8'($urandom);
      {data_available, frame_ready, mem_empty, mem_full} = 4'($urandom);
      #1;
      s = int'(dir); o = 1 - s;
      `CHECK(wr_enable == (dec_active ? dec_wr_enable : m_wr_enable[s]), "write enable")
      `CHECK(wr_new_byte == (dec_active ? dec_wr_new_byte : m_wr_new_byte[s]), "write strobe")
      `CHECK(wr_data == (dec_active ? dec_wr_data : m_wr_data[s]), "write data")
      `CHECK(rd_enable == m_rd_enable[s] && byte_ack == m_rd_byte_ack[s], "read side")
      `CHECK(m_data_available[s] == data_available && m_frame_ready[s] == frame_ready, "status to selected")
      `CHECK(m_empty[s] == (mem_empty && !dec_active) && m_full[s] == (mem_full || dec_active), "busy while decoder writes")
      `CHECK(!m_data_available[o] && !m_frame_ready[o] && m_empty[o] && !m_full[o], "other modifier idle")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin : watchdog
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
