// descrambler64: inverse of scrambler64 (polynomial 1 + x^39 + x^58).
//
// Bit i leaves as r[i] ^ s[38] ^ s[57], where s holds the last 58 received
// (scrambled) bits, newest in s[0]. Because s is built from the received
// stream, the descrambler locks by itself after 58 bits: the first word after
// reset or after a gearbox slip may come out wrong, every later one is right.
//
// Timing: dout is registered; a word presented with `en` in cycle t appears
// in cycle t+1.
module descrambler64 (
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
      s_next    = {s_next[56:0], din[i]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= '0;
      dout  <= '0;
    end else if (en) begin
      state <= s_next;
      dout  <= d_next;
    end
  end

endmodule
