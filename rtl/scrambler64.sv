// scrambler64: self-synchronous 64b/66b scrambler, polynomial
// 1 + x^39 + x^58, 64 bits per enabled clock.
//
// Bit i of the word (bit 0 first) leaves as d[i] ^ s[38] ^ s[57], where s is
// the history of the last 58 scrambled bits, newest in s[0]. Scrambling keeps
// the line DC-balanced with short run lengths and needs no seed exchange: the
// descrambler recovers the data from the received bits alone. Only the 64
// payload bits are scrambled; the 2-bit header is sent as is.
//
// Timing: dout is registered; a word presented with `en` in cycle t appears
// in cycle t+1 and stays until the next enabled cycle. The state is seeded
// with all ones at reset (this design's choice; any seed works).
module scrambler64 (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [63:0] din,
  output logic [63:0] dout
);

  logic [57:0] state;
  logic [57:0] s_next;
  logic [63:0] d_next;

  always_comb begin
    s_next = state;
    for (int i = 0; i < 64; i++) begin
      d_next[i] = din[i] ^ s_next[38] ^ s_next[57];
      s_next    = {s_next[56:0], d_next[i]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= '1;
      dout  <= '0;
    end else if (en) begin
      state <= s_next;
      dout  <= d_next;
    end
  end

endmodule
