// proto_mem: protocol memory of the command port.
//
// A 64 x 8 single-port RAM that holds the header of the frames the tester
// sends to the control PC, already in transmit order, so that sending is a
// walk through increasing addresses with the few variable fields (lengths,
// checksum) filled in on the way. It is written when the address-setting
// command arrives. Synchronous write; the read data is registered and
// appears one clock after the address (block RAM timing). Size and
// organisation follow the tester, which used a vendor-generated RAM.
module proto_mem #(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);
  logic [7:0] ram [DEPTH];
  always_ff @(posedge clk) begin
    if (we) ram[addr] <= wdata;
    rdata <= ram[addr];
  end
endmodule
