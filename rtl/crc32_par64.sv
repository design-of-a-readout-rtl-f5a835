// crc32_par64: CRC-32 over one 64-bit word per clock.
//
// The generator polynomial is that of IEEE 802.3 (0x04C11DB7). A serial
// LFSR would need 64 clocks per word; here the 64 shift steps are unrolled
// into one combinational function, so a word is absorbed every cycle. The
// register is seeded with 0xFFFFFFFF by `init`, the word's bit 0 enters
// first, the register shifts towards its MSB, and no final inversion is
// applied. With this convention the checksum after the words 0, 1, 2 is
// 0x6904BB59, 0x2C2D77FB, 0xCCC5CE0D, and the words 0..30 without word 9
// give 0x7EA9C3A5, the values seen on the running link.
//
// Timing: crc_o is registered; a word presented with `en` in cycle t is
// included in crc_o from cycle t+1. `init` has priority over `en`.
module crc32_par64
  import link_pkg::*;
(
  input  logic        clk,
  input  logic        init,
  input  logic        en,
  input  logic [63:0] data,
  output logic [31:0] crc_o
);

  function automatic logic [31:0] crc_step(input logic [31:0] c, input logic [63:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 64; i++) begin
      if (r[31] ^ d[i]) r = {r[30:0], 1'b0} ^ CRC_POLY;
      else              r = {r[30:0], 1'b0};
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (init)    crc_o <= CRC_INIT;
    else if (en) crc_o <= crc_step(crc_o, data);
  end

endmodule
