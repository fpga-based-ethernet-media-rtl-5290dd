// udp_arp_rx: UDP and ARP receiver of the command port.
//
// The control PC talks to the tester with UDP over IPv4, so the command port
// must recognise UDP datagrams addressed to the tester and answer ARP
// requests for its IP address. This receiver is a state machine driven by
// the byte index from the SFD: it checks each header byte as it arrives
// against the expected value and against the tester's addresses, without
// storing the frame. For an accepted datagram it passes the UDP data bytes
// on (`udp_new_byte` with `udp_data_en` high for exactly the data, the
// length taken from the UDP header so that padding and FCS are not passed).
// For an ARP request whose target IP is the tester's, it raises `arp_found`
// after the frame with the requester's MAC and IP for the reply.
//
// Accepted datagrams: EtherType 0x0800, version 4 with a 20-byte header,
// protocol 17, destination MAC the tester's or broadcast, destination IP the
// tester's (destination port must then match) or 255.255.255.255 (any port).
// Broadcast is what lets the address-setting command reach a tester that has
// no addresses yet. Offsets are the standard Ethernet/IPv4/UDP/ARP ones.
// Frames with a receive error are not answered. Checking byte by byte, the
// header fields and broadcast acceptance follow the tester; the absence of
// IP options and the port rules are this design's choices.
module udp_arp_rx (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  rx_byte,
  input  logic        rx_new_byte,
  input  logic        rx_frame,
  input  logic        rx_err,
  input  logic [47:0] dev_mac,
  input  logic [31:0] dev_ip,
  input  logic [15:0] dev_port,
  output logic [7:0]  udp_byte,
  output logic        udp_new_byte,
  output logic        udp_data_en,
  output logic        arp_found,
  output logic [47:0] arp_sha,
  output logic [31:0] arp_spa,
  output logic [31:0] udp_frames
);
  logic [15:0] idx;
  logic        in_frame;
  logic        mac_ok, mac_bc, ip_type, arp_type, ip_ok, ip_bc, port_ok, arp_ok, err;
  logic [7:0]  ulen_hi;
  logic [15:0] data_end;
  logic [7:0]  b;
  assign b = rx_byte;

  function automatic logic [7:0] byte_of48(input logic [47:0] v, input int i);
    return v[8*(5-i) +: 8];
  endfunction
  function automatic logic [7:0] byte_of32(input logic [31:0] v, input int i);
    return v[8*(3-i) +: 8];
  endfunction

  logic hdr_ok;
  assign hdr_ok = (mac_ok || mac_bc) && ip_type && (ip_ok ? port_ok : ip_bc);

  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0; in_frame <= 1'b0; mac_ok <= 1'b1; mac_bc <= 1'b1; ip_type <= 1'b1;
      arp_type <= 1'b1; ip_ok <= 1'b1; ip_bc <= 1'b1; port_ok <= 1'b1; arp_ok <= 1'b1;
      err <= 1'b0; ulen_hi <= '0; data_end <= '0; udp_new_byte <= 1'b0; udp_data_en <= 1'b0;
      arp_found <= 1'b0; udp_byte <= '0; arp_sha <= '0; arp_spa <= '0; udp_frames <= '0;
    end else begin
      udp_new_byte <= 1'b0;
      arp_found    <= 1'b0;
      if (rx_frame && rx_new_byte) begin
        udp_byte <= b;
        if (!in_frame) begin
          // first byte: reset all checks
          in_frame <= 1'b1; idx <= 16'd1;
          mac_ok <= (b == byte_of48(dev_mac, 0)); mac_bc <= (b == 8'hFF);
          ip_type <= 1'b1; arp_type <= 1'b1; ip_ok <= 1'b1; ip_bc <= 1'b1;
          port_ok <= 1'b1; arp_ok <= 1'b1; err <= 1'b0;
        end else begin
          idx <= idx + 1'b1;
          if (idx < 6) begin
            if (b != byte_of48(dev_mac, int'(idx))) mac_ok <= 1'b0;
            if (b != 8'hFF) mac_bc <= 1'b0;
          end
          case (idx)
            16'd12: begin ip_type <= (b == 8'h08); arp_type <= (b == 8'h08); end
            16'd13: begin if (b != 8'h00) ip_type <= 1'b0; if (b != 8'h06) arp_type <= 1'b0; end
            16'd14: if (b != 8'h45) ip_type <= 1'b0;
            16'd23: if (b != 8'h11) ip_type <= 1'b0;
            16'd20: if (b != 8'h00) arp_ok <= 1'b0;   // ARP operation, high byte
            16'd21: if (b != 8'h01) arp_ok <= 1'b0;   // request
            16'd36: if (b != dev_port[15:8]) port_ok <= 1'b0;
            16'd37: if (b != dev_port[7:0])  port_ok <= 1'b0;
            16'd38: ulen_hi <= b;
            16'd39: begin
              data_end  <= 16'd42 + {ulen_hi, b} - 16'd8;
            end
            default: ;
          endcase
          if (idx >= 30 && idx < 34) begin
            if (b != byte_of32(dev_ip, int'(idx) - 30)) ip_ok <= 1'b0;
            if (b != 8'hFF) ip_bc <= 1'b0;
          end
          if (idx >= 22 && idx < 28) arp_sha <= {arp_sha[39:0], b};
          if (idx >= 28 && idx < 32) arp_spa <= {arp_spa[23:0], b};
          if (idx >= 38 && idx < 42 && b != byte_of32(dev_ip, int'(idx) - 38)) arp_ok <= 1'b0;
        end
        if (rx_err) err <= 1'b1;
        // UDP data
        if (in_frame && idx >= 42 && idx < data_end && hdr_ok) begin
          udp_new_byte <= 1'b1;
          udp_data_en  <= 1'b1;
          if (idx == 42) udp_frames <= udp_frames + 1'b1;
        end else begin
          udp_data_en <= 1'b0;
        end
      end
      if (in_frame && !rx_frame) begin
        in_frame    <= 1'b0;
        udp_data_en <= 1'b0;
        if (arp_type && arp_ok && (mac_ok || mac_bc) && !err && idx >= 42 && dev_ip != '0)
          arp_found <= 1'b1;
      end
    end
  end
endmodule
