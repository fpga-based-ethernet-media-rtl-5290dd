// monitor_selector: frame-aligned choice of the stream copied to a monitor port.
//
// The tester copies traffic of the direction under test to its monitor ports.
// This block takes two byte streams (one per direction: a byte with a write
// strobe, `last` on the final byte) and forwards whole frames of the stream
// chosen by `sel` into a transmit FIFO. A third stream, `inj`, is frames the
// tester itself sends on the port (ARP replies, UDP datagrams); it has
// priority between frames. Arbitration:
//   * `inj_allowed` is high while no frame is being forwarded and the selected
//     stream is not starting one; the injecting block starts only then and
//     holds `inj_busy` for its whole frame, which claims the port;
//   * a frame of the selected stream is forwarded only if its first byte comes
//     while the port is free, otherwise it is skipped whole;
//   * a change of `sel` takes effect at the next frame start.
// The output is registered: one clock from input byte to `out_wr_en`.
// That the monitor ports carry the traffic of the chosen direction follows the
// tester; the frame-skipping arbitration is this design's own.
module monitor_selector (
  input  logic       clk,
  input  logic       rst,
  input  logic       sel,        // 0: stream a, 1: stream b
  input  logic       a_wr_en,
  input  logic [7:0] a_byte,
  input  logic       a_last,
  input  logic       b_wr_en,
  input  logic [7:0] b_byte,
  input  logic       b_last,
  input  logic       inj_busy,
  input  logic       inj_wr_en,
  input  logic [7:0] inj_byte,
  input  logic       inj_last,
  output logic       inj_allowed,
  output logic       out_wr_en,
  output logic [7:0] out_byte,
  output logic       out_last,
  output logic [31:0] frames_fwd
);
  typedef enum logic [1:0] {O_NONE, O_A, O_B, O_INJ} owner_e;
  owner_e owner;
  logic inf_a, inf_b;             // a frame of the stream is in progress
  logic start_a, start_b, start_sel;

  assign start_a     = a_wr_en && !inf_a;
  assign start_b     = b_wr_en && !inf_b;
  assign start_sel   = sel ? start_b : start_a;
  assign inj_allowed = (owner == O_NONE) && !start_sel && !inj_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      owner <= O_NONE; inf_a <= 1'b0; inf_b <= 1'b0;
      out_wr_en <= 1'b0; out_byte <= '0; out_last <= 1'b0; frames_fwd <= '0;
    end else begin
      out_wr_en <= 1'b0; out_last <= 1'b0;
      if (a_wr_en) inf_a <= !a_last;
      if (b_wr_en) inf_b <= !b_last;
      case (owner)
        O_NONE: begin
          if (inj_busy) begin
            owner <= O_INJ;
          end else if (!sel && start_a) begin
            out_wr_en <= 1'b1; out_byte <= a_byte; out_last <= a_last;
            if (a_last) frames_fwd <= frames_fwd + 1; else owner <= O_A;
          end else if (sel && start_b) begin
            out_wr_en <= 1'b1; out_byte <= b_byte; out_last <= b_last;
            if (b_last) frames_fwd <= frames_fwd + 1; else owner <= O_B;
          end
        end
        O_A: if (a_wr_en) begin
          out_wr_en <= 1'b1; out_byte <= a_byte; out_last <= a_last;
          if (a_last) begin owner <= O_NONE; frames_fwd <= frames_fwd + 1; end
        end
        O_B: if (b_wr_en) begin
          out_wr_en <= 1'b1; out_byte <= b_byte; out_last <= b_last;
          if (b_last) begin owner <= O_NONE; frames_fwd <= frames_fwd + 1; end
        end
        O_INJ: begin
          if (inj_wr_en) begin
            out_wr_en <= 1'b1; out_byte <= inj_byte; out_last <= inj_last;
          end
          if (inj_wr_en && inj_last) owner <= O_NONE;
        end
        default: owner <= O_NONE;
      endcase
    end
  end
endmodule
