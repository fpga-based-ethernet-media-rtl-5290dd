// test_mem_frames: the tests that keep whole frames in external memory.
//
// One block, selected by `test_select_i`, runs the tester's memory tests.
// They share one scheme: some incoming frames are written to the memory
// FIFO instead of being forwarded, and later the memory is drained: stored
// frames are read out one by one into the transmit path while any frame
// that arrives meanwhile is also written to memory, so no frame is lost and
// the order of the later frames is kept. The test ends when memory is empty.
//   T_SWAP      store the next `amount` frames, forward the next one, then
//               drain: the stored frames come out after it.
//   T_DELAY_N   store `amount` frames; a timer of `ms` starts with the first;
//               frames after them are forwarded until it expires, then drain.
//   T_DELAY_ALL store everything for `ms`, then drain.
//   T_IPG       store the next frame; when the one after it starts, store
//               that too and drain, so the two leave back to back and the
//               transmitter's gap (set by the modifier from the attribute)
//               is the only idle time between them.
//   T_CUSTOM    the command path has already written a user frame to
//               memory; drain at the next idle moment.
//   T_DOS_BLOCK for `ms`, send the user frame from memory back to back,
//               writing each copy back to memory as it is read; incoming
//               frames are dropped.
//   T_DOS_ALLOW as above, but a frame arriving while no copy is being sent
//               is forwarded and the next copy waits for its end.
// Attributes: T_SWAP byte 0 amount; T_DELAY_N byte 0 amount, bytes 1-2 ms;
// T_DELAY_ALL, T_DOS_* bytes 0-1 ms (big-endian); T_IPG byte 0 is the gap
// (used by the modifier), one frame is stored.
//
// Reading: a frame is read only when the transmit FIFO that will take it is
// empty (`tx_fifo_available_i`); bytes are acknowledged one per clock while
// `mem_rd_data_available_i` is high and `tx_fifo_full_i` is low, and appear
// on `rx_byte_o`/`rx_new_byte_o` with `rx_frame_o` framing them. After each
// frame GAP clocks pass before the next read, which covers post-processing's
// end-of-frame flush. The store-then-drain scheme, the flow-control inputs
// and the 8/16-bit attribute limits follow the tester. DoS by writing each
// copy back to memory, and DoS-allow dropping frames that collide with a copy
// instead of buffering them, are this design's choices.
module test_mem_frames #(
  parameter int unsigned CLK_HZ = 25_000_000,
  parameter int unsigned GAP    = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cmd_enabled_i,
  input  logic [7:0]  test_select_i,
  input  logic [eth_pkg::ATTR_W-1:0] cmd_attributes_i,
  input  logic [7:0]  rx_byte_i,
  input  logic        rx_new_byte_receive_i,
  input  logic        rx_frame_receiving_i,
  output logic [7:0]  rx_byte_o,
  output logic        rx_new_byte_o,
  output logic        rx_frame_o,
  output logic        test_done_o,
  input  logic        tx_fifo_full_i,
  input  logic        tx_fifo_available_i,
  input  logic        tx_fifo_empty_i,
  input  logic [7:0]  mem_rd_data_i,
  input  logic        mem_rd_data_available_i,
  input  logic        mem_rd_frame_ready_i,
  input  logic        mem_empty_i,
  input  logic        mem_full_i,
  output logic        mem_wr_enable_o,
  output logic [7:0]  mem_wr_data_o,
  output logic        mem_wr_new_byte_o,
  output logic        mem_rd_enable_o,
  output logic        mem_rd_byte_ack_o
);
  import eth_pkg::*;

  typedef enum logic [2:0] {P_IDLE, P_STORE, P_PASS, P_DRAIN} phase_e;
  typedef enum logic [1:0] {M_PASS, M_STORE, M_DROP} fmode_e;
  typedef enum logic [1:0] {RD_IDLE, RD_REQ, RD_RUN, RD_GAP} rdst_e;

  phase_e phase;
  fmode_e fmode, fmode_new;
  rdst_e  rd;
  logic   in_frame, start, frame_end;
  logic [7:0]  amount, stored;
  logic [15:0] ms;
  logic        t_start, t_busy, t_done;
  logic        requeue;
  logic [$clog2(GAP+1)-1:0] gap_cnt;
  logic        dos;

  assign dos    = (test_select_i == T_DOS_BLOCK) || (test_select_i == T_DOS_ALLOW);
  assign amount = (cmd_attributes_i[7:0] == 0 || test_select_i == T_IPG) ? 8'd1
                                                                         : cmd_attributes_i[7:0];
  assign ms     = (test_select_i == T_DELAY_N) ? {cmd_attributes_i[15:8], cmd_attributes_i[23:16]}
                                               : {cmd_attributes_i[7:0], cmd_attributes_i[15:8]};

  ms_timer #(.CLK_HZ(CLK_HZ)) u_timer (
    .clk, .rst, .start(t_start), .stop(phase == P_IDLE && !cmd_enabled_i),
    .ms, .busy(t_busy), .done(t_done)
  );

  assign start     = rx_new_byte_receive_i && rx_frame_receiving_i && !in_frame;
  assign frame_end = in_frame && !rx_frame_receiving_i;

  // what to do with a frame that starts now
  always_comb begin
    fmode_new = M_PASS;
    case (phase)
      P_STORE: fmode_new = M_STORE;
      P_PASS:  fmode_new = (test_select_i == T_IPG) ? M_STORE : M_PASS;
      P_DRAIN: begin
        if (test_select_i == T_DOS_BLOCK)      fmode_new = M_DROP;
        else if (test_select_i == T_DOS_ALLOW) fmode_new = (rd == RD_IDLE) ? M_PASS : M_DROP;
        else                                   fmode_new = M_STORE;
      end
      default: fmode_new = M_PASS;
    endcase
    if (mem_full_i && fmode_new == M_STORE) fmode_new = M_DROP;
  end

  fmode_e cur;
  assign cur = start ? fmode_new : fmode;

  logic store_now, pass_now, reading, ack;
  assign store_now = rx_frame_receiving_i && (start || in_frame) && cur == M_STORE;
  assign pass_now  = rx_frame_receiving_i && (start || in_frame) && cur == M_PASS;
  assign reading   = (rd == RD_RUN);
  assign ack       = reading && mem_rd_data_available_i && !tx_fifo_full_i && !mem_rd_frame_ready_i;

  assign mem_wr_enable_o   = store_now || (reading && requeue);
  assign mem_wr_new_byte_o = store_now ? rx_new_byte_receive_i : ack;
  assign mem_wr_data_o     = store_now ? rx_byte_i : mem_rd_data_i;
  assign mem_rd_byte_ack_o = ack;

  assign rx_byte_o     = reading ? mem_rd_data_i : rx_byte_i;
  assign rx_new_byte_o = reading ? ack : (pass_now && rx_new_byte_receive_i);
  assign rx_frame_o    = reading ? !mem_rd_frame_ready_i : pass_now;

  // may a stored frame be read out now?
  logic can_read;
  assign can_read = phase == P_DRAIN && rd == RD_IDLE && !mem_empty_i &&
                    tx_fifo_available_i && !pass_now && !(in_frame && fmode == M_PASS);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= P_IDLE; fmode <= M_PASS; rd <= RD_IDLE; in_frame <= 1'b0; stored <= '0;
      t_start <= 1'b0; requeue <= 1'b0; gap_cnt <= '0; test_done_o <= 1'b0;
      mem_rd_enable_o <= 1'b0;
    end else begin
      t_start <= 1'b0; test_done_o <= 1'b0; mem_rd_enable_o <= 1'b0;
      if (start) begin in_frame <= 1'b1; fmode <= fmode_new; end
      if (frame_end) in_frame <= 1'b0;

      // memory read-out
      case (rd)
        RD_IDLE: if (can_read) begin
          mem_rd_enable_o <= 1'b1; rd <= RD_REQ;
          requeue <= dos && !t_done;
        end
        RD_REQ:  rd <= RD_RUN;
        RD_RUN:  if (mem_rd_frame_ready_i) begin rd <= RD_GAP; gap_cnt <= ($bits(gap_cnt))'(GAP); end
        RD_GAP:  if (gap_cnt == 0) rd <= RD_IDLE; else gap_cnt <= gap_cnt - 1'b1;
      endcase

      case (phase)
        P_IDLE: if (cmd_enabled_i && !in_frame && !test_done_o) begin
          stored <= '0;
          unique case (test_select_i)
            T_SWAP, T_DELAY_N, T_IPG: phase <= P_STORE;
            T_DELAY_ALL: begin phase <= P_STORE; t_start <= 1'b1; end
            T_DOS_BLOCK, T_DOS_ALLOW: begin phase <= P_DRAIN; t_start <= 1'b1; end
            default: phase <= P_DRAIN;   // T_CUSTOM
          endcase
        end
        P_STORE: begin
          if (start && test_select_i == T_DELAY_N && stored == 0) t_start <= 1'b1;
          if (frame_end && fmode == M_STORE && test_select_i != T_DELAY_ALL) begin
            stored <= stored + 1'b1;
            if (stored + 1'b1 >= amount) phase <= P_PASS;
          end
          if (test_select_i == T_DELAY_ALL && t_done && !start) phase <= P_DRAIN;
        end
        P_PASS: begin
          if (test_select_i == T_SWAP && frame_end) phase <= P_DRAIN;
          if (test_select_i == T_IPG && start) phase <= P_DRAIN;
          if (test_select_i == T_DELAY_N && t_done && !in_frame && !start) phase <= P_DRAIN;
        end
        P_DRAIN: begin
          if (rd == RD_IDLE && mem_empty_i && !in_frame && !start && (!dos || t_done) &&
              tx_fifo_empty_i) begin
            phase <= P_IDLE; test_done_o <= 1'b1;
          end
        end
        default: phase <= P_IDLE;
      endcase
      if (!cmd_enabled_i && phase != P_IDLE && phase != P_DRAIN) phase <= P_IDLE;
    end
  end
endmodule
