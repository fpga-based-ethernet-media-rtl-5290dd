// crc32_d8: Ethernet frame check sequence, eight bits per clock.
//
// The IEEE 802.3 CRC-32 is defined bit-serially: a 32-bit linear feedback
// shift register fed with the data least significant bit first. At 100 Mb/s
// a byte arrives every other 25 MHz clock, so a serial LFSR would need a
// clock eight times faster. As the tester does, this block writes the one-bit
// LFSR step in a loop of eight and lets synthesis flatten it into the XOR
// network that advances the register a whole byte per clock.
//
// Interface: `init` loads all ones (start of frame); `en` folds `data` into
// the register. `crc` is the raw register; `fcs` is its complement, which is
// sent least significant byte first as the four FCS bytes. Both are
// combinational from the register (zero latency after the update edge).
// Reflected polynomial 0xEDB88320 is the standard one; the loop formulation
// follows the tester; `init` having priority over `en` is this design's choice.
module crc32_d8 (
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [31:0] crc,
  output logic [31:0] fcs
);
  localparam logic [31:0] POLY = 32'hEDB88320;

  function automatic logic [31:0] step8(input logic [31:0] c, input logic [7:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 8; i++) begin
      if (r[0] ^ d[i]) r = (r >> 1) ^ POLY;
      else             r = r >> 1;
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || init)  crc <= '1;
    else if (en)      crc <= step8(crc, data);
  end

  assign fcs = ~crc;
endmodule
