// mii_tx: reconciliation layer, transmit side.
//
// Takes frames as bytes from a first-word-fall-through FIFO and drives the
// MII: preamble nibbles (0x5), the SFD nibble (0xD), then every byte as two
// nibbles, low nibble first, then at least `ipg_nibbles` clocks with TX_EN low
// before the next frame. The FIFO entry is {pre_mod, last, byte}: `last`
// marks the final byte of a frame (the frame's FCS is already in the data)
// and `pre_mod` on the first byte selects the modified preamble of the
// preamble test: `pre_nibbles` nibbles of 0x5, and the SFD replaced by a
// preamble nibble when `sfd_en` is low. Otherwise the standard 15 nibbles
// plus SFD are sent.
//
// A frame starts as soon as its first byte is in the FIFO (cut-through); the
// fifteen preamble clocks give the writer a head start of several bytes. If
// the FIFO runs dry inside a frame TX_ER is raised and TX_EN held until data
// comes, so the PHY corrupts the frame rather than sending a short one. The
// preamble and SFD handling follows the tester; underrun handling and the
// gap counter are this design's choices. All in the PHY's TX_CLK domain.
module mii_tx (
  input  logic       tx_clk,
  input  logic       rst,
  input  logic [9:0] fifo_data,
  input  logic       fifo_empty,
  output logic       fifo_pop,
  input  logic [5:0] pre_nibbles,
  input  logic       sfd_en,
  input  logic [7:0] ipg_nibbles,
  output logic [3:0] txd,
  output logic       tx_en,
  output logic       tx_er,
  output logic       busy
);
  import eth_pkg::*;

  typedef enum logic [2:0] {T_IDLE, T_PRE, T_SFD, T_LO, T_HI, T_GAP} tstate_e;
  tstate_e st;
  logic [5:0] pre_cnt;
  logic       sfd_send;
  logic [7:0] gap_cnt;

  assign busy = (st != T_IDLE);
  assign fifo_pop = (st == T_HI) && !fifo_empty;

  always_ff @(posedge tx_clk) begin
    if (rst) begin
      st <= T_IDLE; txd <= '0; tx_en <= 1'b0; tx_er <= 1'b0;
      pre_cnt <= '0; sfd_send <= 1'b1; gap_cnt <= '0;
    end else begin
      tx_er <= 1'b0;
      case (st)
        T_IDLE: begin
          tx_en <= 1'b0;
          if (!fifo_empty) begin
            if (fifo_data[9]) begin
              pre_cnt  <= pre_nibbles;
              sfd_send <= sfd_en;
            end else begin
              pre_cnt  <= 6'(PREAMBLE_NIBBLES_STD);
              sfd_send <= 1'b1;
            end
            st <= T_PRE;
          end
        end
        T_PRE: begin
          if (pre_cnt == 0) begin
            txd <= sfd_send ? SFD_NIBBLE : PREAMBLE_NIBBLE; tx_en <= 1'b1;
            st  <= T_LO;
          end else begin
            txd <= PREAMBLE_NIBBLE; tx_en <= 1'b1;
            pre_cnt <= pre_cnt - 1'b1;
          end
        end
        T_LO: begin
          if (fifo_empty) begin
            tx_er <= 1'b1;
          end else begin
            txd <= fifo_data[3:0];
            st  <= T_HI;
          end
        end
        T_HI: begin
          txd <= fifo_data[7:4];
          if (fifo_data[8]) begin
            st <= T_GAP; gap_cnt <= ipg_nibbles;
          end else begin
            st <= T_LO;
          end
        end
        T_GAP: begin
          tx_en <= 1'b0; txd <= '0;
          if (gap_cnt <= 8'd2) st <= T_IDLE;
          else gap_cnt <= gap_cnt - 1'b1;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
