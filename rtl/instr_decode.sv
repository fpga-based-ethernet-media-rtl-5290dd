// instr_decode: command parser of the tester.
//
// UDP data bytes from the command port are scanned for the tester's command
// protocol. Every command starts with the 9-byte main ID "/ETHTEST/", a test
// ID byte and a '/' mark. Normal commands continue with a direction byte
// (1: port 1 to port 2, 2: port 2 to port 1), '/', a 6-byte destination MAC
// for conditional modifying (all zero for none), '/', and then the test's
// attribute bytes; commands that carry a frame (custom frame, DoS) continue
// after their attributes with the frame itself, which is written straight to
// the memory FIFO until the UDP data ends. The address-setting command
// instead carries the tester's and the PC's IP addresses, ports and MAC
// addresses.
//
// The state machine: look for the main ID one byte at a time, falling back
// to its first byte on a mismatch; read the test ID (unknown IDs fall back);
// read the direction (unknown values fall back, a new value is announced by
// `dir_changed`); read the conditional address; then read attributes, or
// read the frame to memory; finally issue the command (`cmd_valid` for one
// clock with test ID, attributes, conditional address and direction). '/'
// bytes are skipped without being checked. Attribute byte j (counted from
// the first byte after the third '/') lands in `cmd_attr[8*j +: 8]`.
//
// The ID, mark and field order, the state sequence and the direct write of
// frames to memory follow the tester. The numeric test IDs, the per-test
// attribute lengths and the 16-byte attribute bus are this design's reading
// of the command tables (the payload command needs 16 bytes).
module instr_decode (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  udp_byte,
  input  logic        udp_new_byte,
  input  logic        udp_data_en,
  // command to the modifiers
  output logic        cmd_valid,
  output logic [7:0]  cmd_test,
  output logic [eth_pkg::ATTR_W-1:0] cmd_attr,
  output logic [47:0] cmd_dest,
  output logic        dir,          // 0: port 1 -> 2, 1: port 2 -> 1
  output logic        dir_changed,
  // address setting
  output logic        init_valid,
  output logic        addr_valid,
  output logic [31:0] dev_ip,
  output logic [31:0] pc_ip,
  output logic [15:0] dev_port,
  output logic [15:0] pc_port,
  output logic [47:0] pc_mac,
  output logic [47:0] dev_mac,
  // frame carried by the command, to the memory FIFO
  output logic        mem_active,
  output logic        mem_wr_enable,
  output logic        mem_wr_new_byte,
  output logic [7:0]  mem_wr_data
);
  import eth_pkg::*;

  typedef enum logic [3:0] {
    D_MAIN, D_TESTID, D_P1, D_DIR, D_P2, D_COND, D_P3, D_ATTR, D_FRAME,
    D_INIT_P, D_INIT, D_WAIT_END
  } dstate_e;
  dstate_e st;
  logic [4:0] k;          // byte counter within a field
  logic [7:0] id;
  logic [4:0] alen;
  logic [8*24-1:0] init_sh;
  logic       was_en;

  function automatic logic [7:0] main_id_byte(input logic [4:0] i);
    return MAIN_ID[8*(MAIN_ID_LEN-1-int'(i)) +: 8];
  endfunction

  logic nb;
  assign nb = udp_new_byte && udp_data_en;
  assign mem_wr_enable   = (st == D_FRAME) && udp_data_en;
  assign mem_wr_new_byte = (st == D_FRAME) && nb;
  assign mem_wr_data     = udp_byte;
  assign mem_active      = (st == D_FRAME);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= D_MAIN; k <= '0; id <= '0; alen <= '0; was_en <= 1'b0;
      cmd_valid <= 1'b0; cmd_test <= '0; cmd_attr <= '0; cmd_dest <= '0;
      dir <= 1'b0; dir_changed <= 1'b0; init_valid <= 1'b0; addr_valid <= 1'b0;
      dev_ip <= '0; pc_ip <= '0; dev_port <= '0; pc_port <= '0; pc_mac <= '0; dev_mac <= '0;
      init_sh <= '0;
    end else begin
      cmd_valid <= 1'b0; dir_changed <= 1'b0; init_valid <= 1'b0;
      was_en <= udp_data_en;
      if (!udp_data_en && was_en) begin
        // end of the datagram
        if (st == D_FRAME || (st == D_ATTR && carries_frame(id) && k == alen)) begin
          cmd_valid <= 1'b1; cmd_test <= id;
        end
        st <= D_MAIN; k <= '0;
      end else if (nb) begin
        case (st)
          D_MAIN: begin
            if (udp_byte == main_id_byte(k)) begin
              if (k == 5'(MAIN_ID_LEN - 1)) begin st <= D_TESTID; k <= '0; end
              else k <= k + 1'b1;
            end else begin
              k <= (udp_byte == main_id_byte(0)) ? 5'd1 : 5'd0;
            end
          end
          D_TESTID: begin
            id <= udp_byte;
            alen <= 5'(attr_len(udp_byte));
            if (udp_byte == T_INIT)          st <= D_INIT_P;
            else if (known_test(udp_byte))   st <= D_P1;
            else begin st <= D_MAIN; k <= '0; end
          end
          D_P1: st <= D_DIR;
          D_DIR: begin
            if (udp_byte == DIR_1_TO_2 || udp_byte == DIR_2_TO_1) begin
              if ((udp_byte == DIR_2_TO_1) != dir) dir_changed <= 1'b1;
              dir <= (udp_byte == DIR_2_TO_1);
              st  <= D_P2;
            end else begin st <= D_MAIN; k <= '0; end
          end
          D_P2: begin st <= D_COND; k <= '0; end
          D_COND: begin
            cmd_dest <= {cmd_dest[39:0], udp_byte};
            if (k == 5'd5) begin st <= D_P3; k <= '0; end
            else k <= k + 1'b1;
          end
          D_P3: begin
            st <= D_ATTR; k <= '0; cmd_attr <= '0;
            if (alen == 0) begin
              if (carries_frame(id)) st <= D_FRAME;
              else begin
                if (id != T_DIRECTION) begin cmd_valid <= 1'b1; cmd_test <= id; end
                st <= D_WAIT_END;
              end
            end
          end
          D_ATTR: begin
            cmd_attr[8*k +: 8] <= udp_byte;
            k <= k + 1'b1;
            if (k + 1'b1 == alen) begin
              if (carries_frame(id)) st <= D_FRAME;
              else begin cmd_valid <= 1'b1; cmd_test <= id; st <= D_WAIT_END; end
            end
          end
          D_FRAME: ;   // bytes go to memory
          D_INIT_P: begin st <= D_INIT; k <= '0; end
          D_INIT: begin
            init_sh <= {init_sh[8*23-1:0], udp_byte};
            k <= k + 1'b1;
            if (k == 5'd23) begin
              {dev_ip, pc_ip, dev_port, pc_port, pc_mac, dev_mac} <= {init_sh[8*23-1:0], udp_byte};
              init_valid <= 1'b1; addr_valid <= 1'b1;
              st <= D_WAIT_END;
            end
          end
          D_WAIT_END: ;
          default: st <= D_MAIN;
        endcase
      end
    end
  end
endmodule
