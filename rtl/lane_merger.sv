// lane_merger: the readout's FIFO sorting element, two FIFOs onto one lane.
//
// It watches the empty flags of two first-word-fall-through FIFOs. If only
// one is non-empty, that one drives its head word onto the common lane and is
// popped. If both are non-empty, control alternates: the FIFO that was not
// granted last time goes first, so neither FIFO fills up while the other
// drains. If both are empty the lane shows zeroes with out_valid low.
// A FIFO that has the lane to itself is served by tying the other empty
// input high.
//
// out_ready low (the FIFO the lane feeds is almost full) holds both FIFOs,
// so back-pressure reaches the first FIFOs instead of losing words in the
// middle of the tree.
//
// MIN_GAP sets the minimum number of clock cycles between two words on the
// lane. MIN_GAP = 1 issues a word every cycle. The last sorting stage of the
// readout uses MIN_GAP = 9 (one clkp cycle in nine, one LHC clock), so that
// the GBT link, which carries one frame per LHC clock, takes every word; this
// pacing is a choice of this design.
//
// Timing: the pop strobe is combinational from the empty flags; the lane
// word is registered and appears one cycle after its pop.
module lane_merger #(
  parameter int unsigned W       = 64,
  parameter int unsigned MIN_GAP = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         a_empty,
  input  logic [W-1:0] a_dout,
  output logic         a_rd,
  input  logic         b_empty,
  input  logic [W-1:0] b_dout,
  output logic         b_rd,
  input  logic         out_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  localparam int unsigned GW = (MIN_GAP > 1) ? $clog2(MIN_GAP) : 1;

  logic          last_was_a;
  logic [GW-1:0] gap_cnt;
  logic          can_issue, grant_a, grant_b;

  assign can_issue = (gap_cnt == '0) && out_ready;
  assign grant_a   = can_issue && !a_empty && (b_empty || !last_was_a);
  assign grant_b   = can_issue && !b_empty && (a_empty ||  last_was_a);
  assign a_rd      = grant_a;
  assign b_rd      = grant_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      last_was_a <= 1'b0;
      gap_cnt    <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      out_valid <= grant_a || grant_b;
      out_data  <= grant_a ? a_dout : (grant_b ? b_dout : '0);
      if (grant_a || grant_b) begin
        last_was_a <= grant_a;
        gap_cnt    <= GW'(MIN_GAP - 1);
      end else if (gap_cnt != '0) begin
        gap_cnt <= gap_cnt - 1'b1;
      end
    end
  end

  // Only one FIFO may own the lane in a cycle.
  always_ff @(posedge clk) begin
    if (!rst) a_one_grant: assert (!(grant_a && grant_b)) else $error("lane_merger: both FIFOs granted");
  end

endmodule
