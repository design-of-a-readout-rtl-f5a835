// track_readout: Readout Track module. Stores the muon tracks sent back by the
// track finder and spreads them over two GBT lanes.
//
// Input: the lwords of N_LINKS CSP receive links. The links carry the same
// data; link MUON_LINK is read. In one LHC clock a CSP link carries nine
// words, of which the first eight may be tracks and the ninth is zero; every
// word with its valid flag set and a non-zero data field is stored in one
// FIFO.
//
// Output: the FIFO is drained as long as it holds words, by time
// demultiplexing: a word goes to lane 0, the next word to lane 1 in the
// following clkp cycle, and then the FIFO waits until CLK_RATIO cycles have
// passed since the lane-0 word (8 further cycles at the default 9) before
// lane 0 gets the next word. Each lane thus carries at most one word per LHC
// clock, the rate of a GBT link. Words leave as one-word lwords (valid,
// start, last set). Latency: 2 (FIFO) + 1 clkp for a word reaching an idle
// module.
//
// The single FIFO and the 1 + 8 cycle demultiplexing follow the readout
// description; the choice of link 0 is this design's. The start, last and
// strobe flags of the incoming lwords are not needed: a track is one word.
module track_readout
  import readout_pkg::*;
#(
  parameter int unsigned N_LINKS   = N_CSP_LINKS,
  parameter int unsigned LINK_SEL  = MUON_LINK,
  parameter int unsigned DEPTH     = FIFO_DEPTH,
  parameter int unsigned RATIO     = CLK_RATIO
) (
  input  logic   clk,
  input  logic   rst,
  input  lword_t ldata_i [N_LINKS],
  output lword_t lane_o [2],
  output logic   overflow_o
);

  localparam int unsigned TW = $clog2(RATIO);

  lword_t             in_w;
  logic [LWORD_W-1:0] f_dout;
  logic               f_empty, f_rd, unused_full, unused_afull;
  logic [TW-1:0]      slot;      // 0: lane 0 may take a word, 1: lane 1 may
  lword_t             lane_q [2];

  assign in_w = ldata_i[LINK_SEL];

  bram_fifo #(.WIDTH(LWORD_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en(in_w.valid && in_w.data != '0), .din(in_w.data),
    .rd_en(f_rd), .dout(f_dout), .empty(f_empty),
    .full(unused_full), .almost_full(unused_afull), .overflow(overflow_o));

  // Slot 0 starts a round only when a word is waiting; slots 1..RATIO-1 run on.
  assign f_rd = !f_empty && (slot == '0 || slot == TW'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      slot      <= '0;
      lane_q[0] <= LWORD_NULL;
      lane_q[1] <= LWORD_NULL;
    end else begin
      lane_q[0] <= LWORD_NULL;
      lane_q[1] <= LWORD_NULL;
      if (slot == '0) begin
        if (!f_empty) begin
          lane_q[0] <= '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1, data: f_dout};
          slot      <= TW'(1);
        end
      end else begin
        if (slot == TW'(1) && !f_empty)
          lane_q[1] <= '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1, data: f_dout};
        slot <= (slot == TW'(RATIO - 1)) ? '0 : slot + 1'b1;
      end
    end
  end

  assign lane_o = lane_q;

endmodule
