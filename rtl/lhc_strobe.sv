// lhc_strobe: marks one clkp cycle in RATIO, the cycle that ends an LHC clock
// period. clkp is generated from the LHC clock at RATIO (9) times its
// frequency, so the phase is fixed after reset; stb_o is high in cycles
// RATIO-1, 2*RATIO-1, ... counted from the end of reset, and phase_o gives
// the position 0..RATIO-1 within the period.
module lhc_strobe #(
  parameter int unsigned RATIO = 9
) (
  input  logic                     clk,
  input  logic                     rst,
  output logic                     stb_o,
  output logic [$clog2(RATIO)-1:0] phase_o
);

  always_ff @(posedge clk) begin
    if (rst)                                       phase_o <= '0;
    else if (phase_o == ($clog2(RATIO))'(RATIO - 1)) phase_o <= '0;
    else                                           phase_o <= phase_o + 1'b1;
  end

  assign stb_o = (phase_o == ($clog2(RATIO))'(RATIO - 1));

endmodule
