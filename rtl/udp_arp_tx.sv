// udp_arp_tx: UDP and ARP transmitter of the command port.
//
// When the address-setting command arrives, this block writes the header of
// a UDP/IPv4 frame from the tester to the control PC into the protocol
// memory, in transmit order (destination PC MAC, source tester MAC, type
// 0x0800, IPv4 header with TTL 64 and protocol 17, the two IP addresses,
// the two ports). It also keeps the ones' complement sum of the fixed IPv4
// header words, so that the header checksum can be completed from the total
// length alone when a frame is sent.
//
// It sends two kinds of frames, one byte every other clock, written into the
// command port's transmit FIFO as bytes with a `last` flag:
//   * ARP reply, after `arp_found` from the receiver: to the requester's MAC,
//     operation 2, the tester's MAC and IP (read from the protocol memory) as
//     sender, the requester as target, padded to 60 bytes.
//   * UDP datagram, on `udp_req` with `udp_len` payload bytes: header read
//     from the protocol memory with total length, header checksum and UDP
//     length filled in on the fly, UDP checksum 0 (unused), then the payload
//     pulled byte by byte (`udp_pull` takes `udp_data`), padding to 60 bytes.
// The FCS is computed on the way and appended. A frame starts only while
// `tx_allowed` is high (the transmit path is free); `busy` is high for the
// whole frame and `arp_sent`/`udp_sent` pulse at the end.
// Header-in-memory and on-the-fly filling follow the tester; field values
// such as TTL and identification 0 are this design's choices.
module udp_arp_tx (
  input  logic        clk,
  input  logic        rst,
  input  logic        init_valid,
  input  logic [31:0] dev_ip,
  input  logic [31:0] pc_ip,
  input  logic [15:0] dev_port,
  input  logic [15:0] pc_port,
  input  logic [47:0] pc_mac,
  input  logic [47:0] dev_mac,
  input  logic        arp_found,
  input  logic [47:0] arp_sha,
  input  logic [31:0] arp_spa,
  input  logic        udp_req,
  input  logic [10:0] udp_len,
  input  logic [7:0]  udp_data,
  output logic        udp_pull,
  input  logic        tx_allowed,
  output logic        wr_en,
  output logic [7:0]  wr_byte,
  output logic        wr_last,
  output logic        busy,
  output logic        arp_sent,
  output logic        udp_sent
);
  typedef enum logic [2:0] {S_IDLE, S_INIT, S_A, S_B, S_FCS} sstate_e;
  sstate_e st;
  logic [5:0]  maddr, mem_addr;
  logic        mwe;
  logic [7:0]  mwdata, mrdata;
  logic [10:0] pos, flen;
  logic        is_arp, arp_pend, udp_pend;
  logic [47:0] r_sha;
  logic [31:0] r_spa;
  logic [10:0] r_len;
  logic [16:0] psum;
  logic [1:0]  fk;
  logic [31:0] crc_unused, fcs;
  logic        crc_init, crc_en;
  logic [7:0]  b;

  proto_mem u_mem (.clk, .addr(mem_addr), .we(mwe), .wdata(mwdata), .rdata(mrdata));
  crc32_d8 u_crc (.clk, .rst, .init(crc_init), .en(crc_en), .data(b), .crc(crc_unused), .fcs);

  // header template byte i, from the address-setting command
  function automatic logic [7:0] tmpl(input logic [5:0] i);
    logic [8*42-1:0] h;
    h = {pc_mac, dev_mac, 16'h0800, 8'h45, 8'h00, 16'h0000, 16'h0000, 16'h0000,
         8'h40, 8'h11, 16'h0000, dev_ip, pc_ip, dev_port, pc_port, 16'h0000, 16'h0000};
    return h[8*(41 - int'(i)) +: 8];
  endfunction

  function automatic logic [15:0] fold(input logic [19:0] s);
    logic [19:0] t;
    t = {4'd0, s[15:0]} + {16'd0, s[19:16]};
    t = {4'd0, t[15:0]} + {16'd0, t[19:16]};
    return t[15:0];
  endfunction

  // IPv4 total length and header checksum of the current datagram
  logic [15:0] ip_len, ip_csum, udp_l;
  assign ip_len  = 16'd28 + {5'd0, r_len};
  assign udp_l   = 16'd8 + {5'd0, r_len};
  assign ip_csum = ~fold({3'd0, psum} + {4'd0, ip_len});

  // the byte at `pos` (valid in S_B, memory data arrived)
  always_comb begin
    b = 8'h00;
    if (is_arp) begin
      if (pos < 6)                    b = r_sha[8*(5 - int'(pos)) +: 8];
      else if (pos < 12)              b = mrdata;
      else if (pos == 12)             b = 8'h08;
      else if (pos == 13)             b = 8'h06;
      else if (pos == 15)             b = 8'h01;
      else if (pos == 16)             b = 8'h08;
      else if (pos == 18)             b = 8'h06;
      else if (pos == 19)             b = 8'h04;
      else if (pos == 21)             b = 8'h02;
      else if (pos >= 22 && pos < 32) b = mrdata;
      else if (pos >= 32 && pos < 38) b = r_sha[8*(37 - int'(pos)) +: 8];
      else if (pos >= 38 && pos < 42) b = r_spa[8*(41 - int'(pos)) +: 8];
    end else begin
      if (pos == 16)      b = ip_len[15:8];
      else if (pos == 17) b = ip_len[7:0];
      else if (pos == 24) b = ip_csum[15:8];
      else if (pos == 25) b = ip_csum[7:0];
      else if (pos == 38) b = udp_l[15:8];
      else if (pos == 39) b = udp_l[7:0];
      else if (pos < 42)  b = mrdata;
      else if (pos < 11'd42 + r_len) b = udp_data;
    end
    if (st == S_FCS) b = fcs[8*fk +: 8];
  end

  // memory address for the byte at `pos` (issued in S_A)
  logic [5:0] rd_addr;
  always_comb begin
    rd_addr = pos[5:0];
    if (is_arp) begin
      if (pos >= 22 && pos < 28)      rd_addr = 6'(pos - 11'd16);   // tester MAC at 6..11
      else if (pos >= 28 && pos < 32) rd_addr = 6'(pos - 11'd2);    // tester IP at 26..29
    end
  end

  // writes use the registered address; a read is addressed in S_A so that
  // the data is there in S_B
  assign mem_addr = mwe ? maddr : rd_addr;
  assign crc_init = (st == S_IDLE);
  assign crc_en   = (st == S_B);
  assign busy     = (st != S_IDLE) && (st != S_INIT);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; maddr <= '0; mwe <= 1'b0; mwdata <= '0; pos <= '0; flen <= '0;
      is_arp <= 1'b0; arp_pend <= 1'b0; udp_pend <= 1'b0; r_sha <= '0; r_spa <= '0;
      r_len <= '0; psum <= '0; fk <= '0; wr_en <= 1'b0; wr_byte <= '0; wr_last <= 1'b0;
      arp_sent <= 1'b0; udp_sent <= 1'b0; udp_pull <= 1'b0;
    end else begin
      wr_en <= 1'b0; wr_last <= 1'b0; mwe <= 1'b0; arp_sent <= 1'b0; udp_sent <= 1'b0;
      udp_pull <= 1'b0;
      if (arp_found) begin arp_pend <= 1'b1; r_sha <= arp_sha; r_spa <= arp_spa; end
      if (udp_req)   begin udp_pend <= 1'b1; r_len <= udp_len; end
      case (st)
        S_IDLE: begin
          if (init_valid) begin
            st <= S_INIT; pos <= '0;
            psum <= 17'(fold({4'd0, 16'h4500} + {4'd0, 16'h4011} +
                             {4'd0, dev_ip[31:16]} + {4'd0, dev_ip[15:0]} +
                             {4'd0, pc_ip[31:16]} + {4'd0, pc_ip[15:0]}));
          end else if (tx_allowed && (arp_pend || udp_pend)) begin
            is_arp <= arp_pend;
            if (arp_pend) arp_pend <= 1'b0; else udp_pend <= 1'b0;
            flen <= arp_pend ? 11'd60 :
                    ((11'd42 + r_len < 11'd60) ? 11'd60 : 11'd42 + r_len);
            pos <= '0; st <= S_A;
          end
        end
        S_INIT: begin
          mwe <= 1'b1; maddr <= pos[5:0]; mwdata <= tmpl(pos[5:0]);
          if (pos == 11'd41) st <= S_IDLE;
          pos <= pos + 1'b1;
        end
        S_A: st <= S_B;
        S_B: begin
          wr_en <= 1'b1; wr_byte <= b;
          if (!is_arp && pos >= 42 && pos < 11'd42 + r_len) udp_pull <= 1'b1;
          if (pos + 1'b1 == flen) begin st <= S_FCS; fk <= '0; end
          else begin pos <= pos + 1'b1; st <= S_A; end
        end
        S_FCS: begin
          wr_en <= 1'b1; wr_byte <= b;
          fk <= fk + 1'b1;
          if (fk == 2'd3) begin
            wr_last <= 1'b1; st <= S_IDLE;
            if (is_arp) arp_sent <= 1'b1; else udp_sent <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
