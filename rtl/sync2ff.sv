// sync2ff: dual flip-flop synchroniser for one bit crossing into the clock
// domain of clk. The first flop may go metastable; the second gives it a
// full clock period to settle before the signal is used. q follows d two
// clk edges later. Use it for levels and slow signals only (the source must
// hold a value longer than a destination clock period); wide data crosses
// through FIFOs. RESET_VAL is the power-up value of both flops.
module sync2ff #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic d,
  output logic q
);

  logic meta = RESET_VAL;
  logic sync = RESET_VAL;

  always_ff @(posedge clk) begin
    meta <= d;
    sync <= meta;
  end

  assign q = sync;

endmodule
