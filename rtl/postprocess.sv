// postprocess: common post-processing of an Ethernet modifier.
//
// Test blocks only touch bytes as they pass; anything that needs knowledge
// of the frame's end is done here for all of them:
//   * delay: the frame is held back by `delay_i` bytes (latched at the first
//     byte, at most MAXD), so a test can still act on bytes it has already
//     passed, for instance after checking the destination address;
//   * FCS fix: when `fix_checksum_i` was raised during the frame, the CRC is
//     computed over the outgoing bytes and replaces the last four bytes (the
//     old FCS) - this needs a delay of at least four;
//   * swap: when `swap_en_i` was raised, the last four delayed bytes are
//     replaced by `swap_data_i` (least significant byte first);
//   * discard: `discard_i` drops the frame; it must come before the first
//     byte has left the delay line.
// One more byte is always held so that the final byte can be written with
// the `last` flag that the transmit FIFO needs. The result is written to a
// tx_double_fifo; the same write strobes are the monitor copy.
//
// Timing: bytes come out (delay+1) input bytes after they went in; at the end
// of the frame (`frame_i` low) the held bytes are flushed one per clock, so
// frames must be separated by at least MAXD+3 clocks, which the 12-byte
// inter-packet gap gives. The three features follow the tester; the sticky
// capture of the control inputs and the extra held byte are this design's.
module postprocess #(
  parameter int unsigned MAXD = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  byte_i,
  input  logic        new_byte_i,
  input  logic        frame_i,
  input  logic [3:0]  delay_i,
  input  logic        fix_checksum_i,
  input  logic        swap_en_i,
  input  logic [31:0] swap_data_i,
  input  logic        discard_i,
  input  logic        pre_mod_i,
  output logic        wr_en,
  output logic [7:0]  wr_byte,
  output logic        wr_last,
  output logic        wr_pre_mod,
  output logic [31:0] frames_out
);
  localparam int unsigned IW = (MAXD > 1) ? $clog2(MAXD) : 1;
  logic [7:0]  dl [MAXD];
  logic [3:0]  d, n, k;
  logic        active, flushing;
  logic        fix_l, swap_l, disc_l, pre_l, first_w;
  logic [31:0] swap_d;
  logic [7:0]  pend;
  logic        pend_v;
  logic        crc_init, crc_en;
  logic [7:0]  crc_in;
  logic [31:0] crc_unused, fcs;

  crc32_d8 u_crc (.clk, .rst, .init(crc_init), .en(crc_en), .data(crc_in),
                  .crc(crc_unused), .fcs);

  // byte leaving the delay line / flush in this cycle
  logic       emit;
  logic [7:0] emit_b;
  logic       emit_fcs;   // replaced byte: not part of the CRC
  logic [3:0] dd;
  logic [3:0] rem;        // bytes still in the line before this flush step

  always_comb begin
    emit = 1'b0; emit_b = '0; emit_fcs = 1'b0; rem = '0;
    dd = (delay_i > 4'(MAXD)) ? 4'(MAXD) : delay_i;
    if (flushing) begin
      if (k < n) begin
        emit = 1'b1;
        rem  = n - k;                  // this byte is rem-th from the end
        emit_b = dl[IW'(n - k - 1'b1)];
        if (fix_l && n >= 4 && rem <= 4) begin
          emit_fcs = 1'b1;
          emit_b   = fcs[8*(4-rem) +: 8];
        end else if (swap_l && n >= 4 && rem <= 4) begin
          emit_fcs = 1'b1;
          emit_b   = swap_d[8*(4-rem) +: 8];
        end
      end
    end else if (new_byte_i && frame_i) begin
      if (!active) begin
        if (dd == 0) begin emit = 1'b1; emit_b = byte_i; end
      end else if (n == d) begin
        emit = 1'b1;
        emit_b = (d == 0) ? byte_i : dl[IW'(d - 1'b1)];
      end
    end
  end

  assign crc_init = !active && !flushing;
  assign crc_en   = emit && !emit_fcs;
  assign crc_in   = emit_b;

  logic disc_now;
  assign disc_now = disc_l || discard_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; flushing <= 1'b0; n <= '0; d <= '0; k <= '0;
      fix_l <= 1'b0; swap_l <= 1'b0; disc_l <= 1'b0; pre_l <= 1'b0;
      swap_d <= '0; pend <= '0; pend_v <= 1'b0; first_w <= 1'b0;
      wr_en <= 1'b0; wr_byte <= '0; wr_last <= 1'b0; wr_pre_mod <= 1'b0;
      frames_out <= '0;
      for (int i = 0; i < int'(MAXD); i++) dl[i] <= '0;
    end else begin
      wr_en <= 1'b0; wr_last <= 1'b0; wr_pre_mod <= 1'b0;
      // sticky controls, captured any time during a frame
      if (frame_i || active) begin
        if (fix_checksum_i) fix_l <= 1'b1;
        if (swap_en_i) begin swap_l <= 1'b1; swap_d <= swap_data_i; end
        if (discard_i) disc_l <= 1'b1;
        if (pre_mod_i) pre_l <= 1'b1;
      end
      // shift the delay line
      if (!flushing && new_byte_i && frame_i) begin
        if (!active) begin
          active <= 1'b1;
          d <= dd;
          if (dd != 0) begin dl[0] <= byte_i; n <= 4'd1; end
          else n <= '0;
        end else if (d != 0) begin
          dl[0] <= byte_i;
          for (int i = 1; i < int'(MAXD); i++) dl[i] <= dl[i-1];
          if (n != d) n <= n + 1'b1;
        end
      end
      // the emitted byte goes to the pending register, the pending one out
      if (emit) begin
        pend   <= emit_b;
        pend_v <= 1'b1;
        if (pend_v && !disc_now) begin
          wr_en <= 1'b1; wr_byte <= pend; wr_pre_mod <= !first_w && (pre_l || pre_mod_i);
          first_w <= 1'b1;
        end
      end
      // end of frame
      if (active && !frame_i && !flushing) begin
        flushing <= 1'b1; k <= '0; active <= 1'b0;
      end
      if (flushing) begin
        if (k < n) k <= k + 1'b1;
        else begin
          if (pend_v && !disc_l) begin
            wr_en <= 1'b1; wr_byte <= pend; wr_last <= 1'b1;
            wr_pre_mod <= !first_w && pre_l;
            frames_out <= frames_out + 1'b1;
          end
          flushing <= 1'b0; n <= '0; pend_v <= 1'b0; first_w <= 1'b0;
          fix_l <= 1'b0; swap_l <= 1'b0; disc_l <= 1'b0; pre_l <= 1'b0;
        end
      end
    end
  end
endmodule
