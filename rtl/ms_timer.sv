// ms_timer: millisecond timer shared by the time-based tests.
//
// A test loads a time in milliseconds with `start`; `done` rises once that
// many milliseconds have passed and stays high until the next `start` or
// `stop`. Time is counted as clock edges of the known clock: a prescaler of
// CLK_HZ/1000 clocks makes one millisecond. A time of 0 finishes after one
// clock. `busy` is high while counting. The 16-bit millisecond range (up to
// 65535 ms) and counting clock edges follow the tester; the interface is this
// design's. CLK_HZ defaults to the 25 MHz MII clock.
module ms_timer #(
  parameter int unsigned CLK_HZ = 25_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        stop,
  input  logic [15:0] ms,
  output logic        busy,
  output logic        done
);
  localparam int unsigned TICKS = (CLK_HZ / 1000 < 1) ? 1 : CLK_HZ / 1000;
  localparam int unsigned PW = $clog2(TICKS + 1);
  logic [PW-1:0] pre;
  logic [15:0]   left;

  always_ff @(posedge clk) begin
    if (rst || stop) begin
      busy <= 1'b0; done <= 1'b0; pre <= '0; left <= '0;
    end else if (start) begin
      busy <= 1'b1; done <= 1'b0; pre <= PW'(TICKS - 1); left <= ms;
    end else if (busy) begin
      if (left == 0) begin
        busy <= 1'b0; done <= 1'b1;
      end else if (pre == 0) begin
        pre  <= PW'(TICKS - 1);
        left <= left - 1'b1;
      end else begin
        pre <= pre - 1'b1;
      end
    end
  end
endmodule
