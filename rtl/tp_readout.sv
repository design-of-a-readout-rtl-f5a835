// tp_readout: Readout TP module. Buffers the trigger primitives (TPs) of the
// four chambers of a sector and sorts them onto two GBT lanes.
//
// Input: N_TP lanes of TP_W bits on clkp, one per chamber; an all-zero lane
// carries no TP. Each non-zero TP is written into that chamber's FIFO. FIFO
// pairs (0,1) and (2,3) are each merged onto one output lane by a
// lane_merger (single owner drives, both busy alternate, both empty idle),
// which issues at most one TP per OUT_GAP cycles (one per LHC clock).
//
// TP_W is the TP frame width (64 by default). A wider frame, up to the 84
// bits of a GBT frame, does not fit one 64-bit lword, so it leaves as two
// lwords on consecutive cycles: first the 64 LSBs with start set, then the
// remaining bits in the low end of the second word with last set; the GBT TX
// sorter puts the two together again. A 64-bit TP leaves as one lword with
// start and last set.
//
// The FIFO count, the sorting rule and the two-part transfer follow the
// readout description; the FIFO pairing and the output pacing are this
// design's choices. Latency: 2 (FIFO) + 1 (merger) clkp for a 64-bit TP,
// one more for a split TP.
//
// The strobe flag of the lanes is constant 1: every clkp cycle is a word
// slot of the lane, whether or not it carries a word.
module tp_readout
  import readout_pkg::*;
#(
  parameter int unsigned TP_W    = TPG_READOUT_SIZE,
  parameter int unsigned DEPTH   = FIFO_DEPTH,
  parameter int unsigned OUT_GAP = CLK_RATIO
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [TP_W-1:0] tps_i [N_TP],
  output lword_t          lane_o [2],
  output logic [N_TP-1:0] overflow_o
);

  logic [TP_W-1:0] f_dout [N_TP];
  logic [N_TP-1:0] f_empty, f_rd;

  for (genvar k = 0; k < N_TP; k++) begin : g_fifo
    logic unused_full, unused_afull;
    bram_fifo #(.WIDTH(TP_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst,
      .wr_en(tps_i[k] != '0), .din(tps_i[k]),
      .rd_en(f_rd[k]), .dout(f_dout[k]), .empty(f_empty[k]),
      .full(unused_full), .almost_full(unused_afull), .overflow(overflow_o[k]));
  end

  for (genvar o = 0; o < 2; o++) begin : g_lane
    logic            m_valid;
    logic [TP_W-1:0] m_data;

    lane_merger #(.W(TP_W), .MIN_GAP(OUT_GAP)) u_merge (
      .clk, .rst,
      .a_empty(f_empty[2*o]),   .a_dout(f_dout[2*o]),   .a_rd(f_rd[2*o]),
      .b_empty(f_empty[2*o+1]), .b_dout(f_dout[2*o+1]), .b_rd(f_rd[2*o+1]),
      .out_ready(1'b1), .out_valid(m_valid), .out_data(m_data));

    if (TP_W <= LWORD_W) begin : g_one_part
      assign lane_o[o] = '{valid: m_valid, start: m_valid, last: m_valid, strobe: 1'b1,
                           data: LWORD_W'(m_data)};
    end else begin : g_two_part
      logic [TP_W-LWORD_W-1:0] high_q;
      logic                    pend_q;
      lword_t                  lane_q;

      always_ff @(posedge clk) begin
        if (rst) begin
          high_q <= '0;
          pend_q <= 1'b0;
          lane_q <= LWORD_NULL;
        end else if (m_valid) begin
          lane_q <= '{valid: 1'b1, start: 1'b1, last: 1'b0, strobe: 1'b1, data: m_data[LWORD_W-1:0]};
          high_q <= m_data[TP_W-1:LWORD_W];
          pend_q <= 1'b1;
        end else if (pend_q) begin
          lane_q <= '{valid: 1'b1, start: 1'b0, last: 1'b1, strobe: 1'b1, data: LWORD_W'(high_q)};
          pend_q <= 1'b0;
        end else begin
          lane_q <= LWORD_NULL;
        end
      end
      assign lane_o[o] = lane_q;
    end
  end

  initial begin
    assert (TP_W <= GBT_FRAME_W) else $error("tp_readout: a TP must fit one GBT frame");
    assert (TP_W <= LWORD_W || OUT_GAP >= 2) else $error("tp_readout: a split TP needs two cycles");
  end

endmodule
