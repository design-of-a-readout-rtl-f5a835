// readout: the Readout module of the BMTL1 payload (one sector).
//
// It sits in the payload next to the sector's trigger-primitive generator
// and collects three kinds of data for the DAQ path:
//  - TDC hits (13 lanes x 32 bits) into hit_readout,
//  - trigger primitives (4 lanes x TP_W bits) into tp_readout,
//  - muon tracks returned by the track finder over CSP links into
//    track_readout.
// Each stores its data in block-RAM FIFOs (11 + 4 + 1 = 16) and sorts it onto
// two lanes, giving six lword lanes for six GBT links:
//   gbt_ldata_o[0..1] hits, [2..3] TPs, [4..5] tracks.
// All lanes run on clkp and carry at most one word per LHC clock.
// overflow_o gathers the sticky overflow flags of the 16 FIFOs:
// bits 10:0 hit FIFOs, 14:11 TP FIFOs, 15 track FIFO.
// The three-module structure follows the readout description; the order of
// the lanes is this design's choice.
// The strobe flags of the hit and TP lanes are constant 1 (see those
// modules).
module readout
  import readout_pkg::*;
#(
  parameter int unsigned TP_W     = TPG_READOUT_SIZE,
  parameter int unsigned LINK_SEL = MUON_LINK,
  parameter int unsigned DEPTH    = FIFO_DEPTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [HIT_W-1:0] hits_i      [N_HIT_IN],
  input  logic [TP_W-1:0]  tps_i       [N_TP],
  input  lword_t           csp_ldata_i [N_CSP_LINKS],
  output lword_t           gbt_ldata_o [N_GBT],
  output logic [15:0]      overflow_o
);

  lword_t hit_lane [2], tp_lane [2], trk_lane [2];

  hit_readout #(.N_HIT(N_HIT_IN), .DEPTH(DEPTH), .OUT_GAP(CLK_RATIO)) u_hit (
    .clk, .rst, .hits_i, .lane_o(hit_lane), .overflow_o(overflow_o[10:0]));

  tp_readout #(.TP_W(TP_W), .DEPTH(DEPTH), .OUT_GAP(CLK_RATIO)) u_tp (
    .clk, .rst, .tps_i, .lane_o(tp_lane), .overflow_o(overflow_o[14:11]));

  track_readout #(.N_LINKS(N_CSP_LINKS), .LINK_SEL(LINK_SEL), .DEPTH(DEPTH), .RATIO(CLK_RATIO)) u_track (
    .clk, .rst, .ldata_i(csp_ldata_i), .lane_o(trk_lane), .overflow_o(overflow_o[15]));

  assign gbt_ldata_o[0] = hit_lane[0];
  assign gbt_ldata_o[1] = hit_lane[1];
  assign gbt_ldata_o[2] = tp_lane[0];
  assign gbt_ldata_o[3] = tp_lane[1];
  assign gbt_ldata_o[4] = trk_lane[0];
  assign gbt_ldata_o[5] = trk_lane[1];

endmodule
