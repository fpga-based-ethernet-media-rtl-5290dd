// mii_rx_bytes: MII receive nibbles to bytes, synchronized on the SFD.
//
// A PHY does not always pass all fifteen preamble nibbles to the MII, so the
// receiver cannot count them. Instead it discards nibbles while RX_DV is high
// until it sees the SFD nibble (0xD), and from the next nibble on packs pairs
// of nibbles into bytes, first nibble in the low half as MII delivers them.
// The preamble is thrown away; the transmitter adds a full one again.
//
// One byte is held back so that the byte preceding the fall of RX_DV can be
// flagged `out_last`: a byte leaves on `out_valid` when the next byte has
// been assembled or when RX_DV drops. `out_err` is set on the last byte if
// RX_ER was seen anywhere in the frame or the frame ended on an odd nibble.
// All signals are in the PHY's RX_CLK domain. Latency from the second nibble
// of a byte to its `out_valid` is one byte time (two clocks) plus one clock.
// The SFD synchronization and nibble order follow the tester; the hold-back
// byte and error flag are this design's choices.
module mii_rx_bytes (
  input  logic       rx_clk,
  input  logic       rst,
  input  logic       rx_dv,
  input  logic       rx_er,
  input  logic [3:0] rxd,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic       out_last,
  output logic       out_err
);
  import eth_pkg::*;

  typedef enum logic [1:0] {R_IDLE, R_PRE, R_LO, R_HI} rstate_e;
  rstate_e st;
  logic [3:0] lo_nib;
  logic [7:0] held;
  logic       held_v;
  logic       err;

  always_ff @(posedge rx_clk) begin
    if (rst) begin
      st <= R_IDLE; held_v <= 1'b0; err <= 1'b0;
      out_valid <= 1'b0; out_last <= 1'b0; out_err <= 1'b0; out_byte <= '0;
      lo_nib <= '0; held <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_err   <= 1'b0;
      if (!rx_dv) begin
        if (held_v) begin
          out_valid <= 1'b1; out_byte <= held; out_last <= 1'b1;
          out_err   <= err || (st == R_HI);
        end
        held_v <= 1'b0;
        err    <= 1'b0;
        st     <= R_IDLE;
      end else begin
        if (rx_er) err <= 1'b1;
        case (st)
          R_IDLE, R_PRE: st <= (rxd == SFD_NIBBLE) ? R_LO : R_PRE;
          R_LO: begin lo_nib <= rxd; st <= R_HI; end
          R_HI: begin
            if (held_v) begin out_valid <= 1'b1; out_byte <= held; end
            held   <= {rxd, lo_nib};
            held_v <= 1'b1;
            st     <= R_LO;
          end
        endcase
      end
    end
  end
endmodule
