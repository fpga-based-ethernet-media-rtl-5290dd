// test_harness.svh: common stimulus of the test-block testbenches. Included
// inside a testbench module after tb_util.svh. It provides the clock, reset,
// a frame state handler in front of the block under test (so the block sees
// the same tagged stream as in the modifier), the command inputs and send(),
// which feeds one frame a byte every two clocks and then idles for 24 clocks. A watchdog
// ends the run after 200000 clocks.
import eth_pkg::*;
logic clk = 0, rst = 1;
always #5 clk = ~clk;
logic [7:0] s_byte = 0;
logic s_new = 0, s_frame = 0, s_last = 0;
logic [7:0] fs_byte;
logic fs_new, fs_frame, fs_last;
frame_state_e fs_state;
logic [15:0] fs_index;
frame_state u_fs (.clk, .rst, .byte_i(s_byte), .new_byte_i(s_new), .frame_i(s_frame),
                  .last_i(s_last), .byte_o(fs_byte), .new_byte_o(fs_new), .frame_o(fs_frame),
                  .last_o(fs_last), .state_o(fs_state), .index_o(fs_index));
logic cmd_enabled = 0;
logic [ATTR_W-1:0] attr = '0;
logic [47:0] dest = '0;

initial begin : watchdog
  repeat (200000) @(posedge clk);
  failures++; $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
end

task automatic send(input logic [7:0] f[$]);
  foreach (f[i]) begin
    @(negedge clk); s_frame = 1; s_new = 1; s_byte = f[i]; s_last = (i == f.size() - 1);
    @(negedge clk); s_new = 0; s_last = 0;
  end
  @(negedge clk); s_frame = 0;
  repeat (24) @(negedge clk);
endtask

function automatic void set_attr(input int j, input logic [7:0] v);
  attr[8*j +: 8] = v;
endfunction
