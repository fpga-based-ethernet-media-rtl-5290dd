// mem_fifos: chunk-oriented FIFO on top of the external memory.
//
// The tester keeps whole Ethernet frames in external DDR2 memory and wants
// to use it as one large FIFO of frames without handling addresses. This
// block provides that: a writer hands over a chunk (a frame) byte by byte,
// framed by `wr_enable`; a reader asks for the next chunk with `rd_enable`
// and takes its bytes one at a time with `byte_ack`.
//
// Layout: chunks are stored one after another in a circular word space of
// 2**MEM_AW 32-bit words. When a chunk starts, its first word is skipped and
// its address kept; bytes are gathered four at a time (first byte in bits
// 7:0) and written to the following words; when `wr_enable` falls the last
// partial word is written and then the byte count into the skipped first
// word. The reader therefore finds the count in the first word of every
// chunk without any separate length store. The reader fetches that word,
// then the data words, into a small word FIFO (WF_DEPTH words, issuing only
// as many reads as it has room for), and presents the bytes on `rd_data`
// with `data_available`. `frame_ready` rises after the last byte is
// acknowledged and stays high until the next `rd_enable`. A read request
// made while no complete chunk is stored waits for one.
// `mem_empty`: no chunk stored, none being written or read. `mem_full`:
// fewer than FULL_MARGIN words free, enough for one more maximum frame.
//
// Memory port: one-word write commands (`mem_wr_cmd_en` with address and
// data, always accepted) and one-word read commands whose data return in
// order on `mem_rd_data_valid` after any latency. It stands for the user
// ports of the vendor DDR2 controller, which are not part of this design.
//
// The count-in-first-word layout, the byte gathering into four-byte words,
// the chunk handshake and the signal names follow the tester. This version
// runs in one clock domain: the tester's write and read processes run in the
// memory controller's clock and meet the user side through FIFOs and
// synchronizers, and it can start reading a chunk still being written; both
// are left out here.
module mem_fifos #(
  parameter int unsigned MEM_AW      = 26,
  parameter int unsigned WF_DEPTH    = 8,
  parameter int unsigned FULL_MARGIN = 512
) (
  input  logic              clk,
  input  logic              rst,
  // user write side
  input  logic              wr_enable,
  input  logic              wr_new_byte,
  input  logic [7:0]        wr_data,
  output logic              mem_full,
  // user read side
  input  logic              rd_enable,
  output logic [7:0]        rd_data,
  input  logic              byte_ack,
  output logic              data_available,
  output logic              frame_ready,
  output logic              mem_empty,
  // memory controller user ports
  output logic              mem_wr_cmd_en,
  output logic [MEM_AW-1:0] mem_wr_addr,
  output logic [31:0]       mem_wr_data,
  output logic              mem_rd_cmd_en,
  output logic [MEM_AW-1:0] mem_rd_addr,
  input  logic              mem_rd_data_valid,
  input  logic [31:0]       mem_rd_data
);
  localparam int unsigned WFA = $clog2(WF_DEPTH);

  // ---------------- write side ----------------
  typedef enum logic [1:0] {W_IDLE, W_DATA, W_TAIL, W_HDR} wstate_e;
  wstate_e ws;
  logic [MEM_AW-1:0] wp, hdr_addr;
  logic [31:0] wword;
  logic [1:0]  wbytes;
  logic [15:0] wcount;
  logic [15:0] chunks;
  logic        chunk_done, chunk_taken;

  always_ff @(posedge clk) begin
    if (rst) begin
      ws <= W_IDLE; wp <= '0; hdr_addr <= '0; wword <= '0; wbytes <= '0; wcount <= '0;
      mem_wr_cmd_en <= 1'b0; mem_wr_addr <= '0; mem_wr_data <= '0; chunk_done <= 1'b0;
    end else begin
      mem_wr_cmd_en <= 1'b0;
      chunk_done    <= 1'b0;
      case (ws)
        W_IDLE: if (wr_enable) begin
          hdr_addr <= wp; wp <= wp + 1'b1; wbytes <= '0; wcount <= '0;
          ws <= W_DATA;
          if (wr_new_byte) begin
            wword[7:0] <= wr_data; wbytes <= 2'd1; wcount <= 16'd1;
          end
        end
        W_DATA: begin
          if (wr_enable && wr_new_byte) begin
            wword[8*wbytes +: 8] <= wr_data;
            wbytes <= wbytes + 1'b1;
            wcount <= wcount + 1'b1;
            if (wbytes == 2'd3) begin
              mem_wr_cmd_en <= 1'b1; mem_wr_addr <= wp;
              mem_wr_data <= {wr_data, wword[23:0]};
              wp <= wp + 1'b1;
            end
          end else if (!wr_enable) begin
            ws <= (wbytes != 0) ? W_TAIL : W_HDR;
          end
        end
        W_TAIL: begin
          mem_wr_cmd_en <= 1'b1; mem_wr_addr <= wp; mem_wr_data <= wword;
          wp <= wp + 1'b1; ws <= W_HDR;
        end
        W_HDR: begin
          mem_wr_cmd_en <= 1'b1; mem_wr_addr <= hdr_addr; mem_wr_data <= {16'd0, wcount};
          chunk_done <= 1'b1; ws <= W_IDLE;
        end
      endcase
    end
  end

  // ---------------- read side ----------------
  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_HDR, R_DATA} rstate_e;
  rstate_e rs;
  logic [MEM_AW-1:0] rp, raddr;
  logic        req;
  logic [15:0] rbytes_left, words_to_issue;
  logic [31:0] wf [WF_DEPTH];
  logic [WFA:0] wf_cnt, wf_inflight;
  logic [WFA-1:0] wf_head, wf_tail;
  logic [1:0]  bidx;
  logic        pop_word, issue;

  assign data_available = (rs == R_DATA) && (wf_cnt != 0) && (rbytes_left != 0);
  assign rd_data  = wf[wf_head][8*bidx +: 8];
  assign pop_word = byte_ack && data_available && (bidx == 2'd3 || rbytes_left == 16'd1);
  assign issue    = (rs == R_DATA) && (words_to_issue != 0) &&
                    ({1'b0, wf_cnt} + {1'b0, wf_inflight} < (WFA+2)'(WF_DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      rs <= R_IDLE; rp <= '0; raddr <= '0; req <= 1'b0; rbytes_left <= '0;
      words_to_issue <= '0; wf_cnt <= '0; wf_inflight <= '0; wf_head <= '0; wf_tail <= '0;
      bidx <= '0; mem_rd_cmd_en <= 1'b0; mem_rd_addr <= '0; frame_ready <= 1'b0;
      chunk_taken <= 1'b0;
      for (int i = 0; i < int'(WF_DEPTH); i++) wf[i] <= '0;
    end else begin
      mem_rd_cmd_en <= 1'b0;
      chunk_taken   <= 1'b0;
      if (rd_enable) begin req <= 1'b1; frame_ready <= 1'b0; end
      case (rs)
        R_IDLE: if ((req || rd_enable) && chunks != 0) begin
          req <= 1'b0; frame_ready <= 1'b0;
          mem_rd_cmd_en <= 1'b1; mem_rd_addr <= rp; rs <= R_WAIT;
        end
        R_WAIT: if (mem_rd_data_valid) begin
          rbytes_left    <= mem_rd_data[15:0];
          words_to_issue <= (mem_rd_data[15:0] + 16'd3) >> 2;
          raddr <= rp + 1'b1;
          rs    <= R_HDR;
        end
        R_HDR: begin
          bidx <= '0;
          if (rbytes_left == 0) begin
            rp <= raddr; rs <= R_IDLE; frame_ready <= 1'b1; chunk_taken <= 1'b1;
          end else rs <= R_DATA;
        end
        R_DATA: begin
          if (issue) begin
            mem_rd_cmd_en <= 1'b1; mem_rd_addr <= raddr;
            raddr <= raddr + 1'b1;
            words_to_issue <= words_to_issue - 1'b1;
          end
          if (byte_ack && data_available) begin
            bidx <= bidx + 1'b1;
            rbytes_left <= rbytes_left - 1'b1;
            if (rbytes_left == 16'd1) begin
              rp <= raddr; rs <= R_IDLE; frame_ready <= 1'b1; chunk_taken <= 1'b1;
              bidx <= '0;
            end
          end
        end
      endcase
      // word FIFO bookkeeping
      if (mem_rd_data_valid && rs == R_DATA) begin
        wf[wf_tail] <= mem_rd_data;
        wf_tail <= wf_tail + 1'b1;
      end
      wf_cnt <= wf_cnt + (WFA+1)'(mem_rd_data_valid && rs == R_DATA) - (WFA+1)'(pop_word);
      wf_inflight <= wf_inflight + (WFA+1)'(issue) - (WFA+1)'(mem_rd_data_valid && rs == R_DATA);
      if (pop_word) wf_head <= wf_head + 1'b1;
    end
  end

  // ---------------- shared bookkeeping ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      chunks <= '0;
    end else begin
      chunks <= chunks + 16'(chunk_done) - 16'(chunk_taken);
    end
  end

  // words between the reader's chunk start and the writer's next free word
  logic [MEM_AW-1:0] used;
  assign used      = wp - rp;
  assign mem_full  = {1'b0, used} >= (MEM_AW+1)'(2**MEM_AW - FULL_MARGIN);
  assign mem_empty = (chunks == 0) && !chunk_done && (ws == W_IDLE) && (rs == R_IDLE) && !wr_enable;
endmodule
