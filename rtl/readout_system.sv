// readout_system: the BMTL1 readout chain from the sector's data to the GBT
// links towards the DAQ.
//
// The readout module (hit, TP and track buffering and sorting) produces six
// lword lanes on clkp. Each lane feeds a gbt_tx_sorter, which moves the word
// into an 84-bit GBT frame sent once per LHC clock; lhc_strobe marks the
// LHC-clock edge inside the clkp domain (clkp = 9 x LHC clock, same source).
// An IPbus control/status register bank, clocked by the IPbus clock, selects
// per link between readout data and the link test pattern and reports the
// sticky overflow flags.
//
// IPbus register map:
//   0x0 control, bits 5:0  pattern select of GBT links 0..5 (1 = pattern)
//   0x1 status,  bits 15:0 FIFO overflow flags (see readout),
//                bits 21:16 sorter drop flags of GBT links 0..5
// Control bits enter the clkp domain through two-flop synchronisers and the
// status bits enter the IPbus domain the same way; both are quasi-static.
//
// GBT links: 0-1 hits, 2-3 TPs, 4-5 tracks. The framework's TX buffers, which
// pass data through in normal running, and the GBT link cores themselves are
// outside this module.
module readout_system
  import readout_pkg::*;
  import ipbus_pkg::*;
#(
  parameter int unsigned TP_W     = TPG_READOUT_SIZE,
  parameter int unsigned LINK_SEL = MUON_LINK,
  parameter int unsigned DEPTH    = FIFO_DEPTH
) (
  input  logic                   clk,       // clkp
  input  logic                   rst,
  input  logic [HIT_W-1:0]       hits_i      [N_HIT_IN],
  input  logic [TP_W-1:0]        tps_i       [N_TP],
  input  lword_t                 csp_ldata_i [N_CSP_LINKS],
  input  logic                   ipb_clk,
  input  logic                   ipb_rst,
  input  ipb_wbus_t              ipb_i,
  output ipb_rbus_t              ipb_o,
  output logic [GBT_FRAME_W-1:0] gbt_data_o  [N_GBT],
  output logic [N_GBT-1:0]       gbt_valid_o,
  output logic                   lhc_stb_o
);

  lword_t                    lane [N_GBT];
  logic [15:0]               overflow;
  logic [N_GBT-1:0]          drop;
  logic [N_GBT-1:0]          pattern_sel;
  logic [31:0]               ctrl [1];
  logic [31:0]               stat [1];
  logic [21:0]               stat_sync;
  logic [$clog2(CLK_RATIO)-1:0] unused_phase;

  readout #(.TP_W(TP_W), .LINK_SEL(LINK_SEL), .DEPTH(DEPTH)) u_readout (
    .clk, .rst, .hits_i, .tps_i, .csp_ldata_i, .gbt_ldata_o(lane), .overflow_o(overflow));

  lhc_strobe #(.RATIO(CLK_RATIO)) u_lhc (
    .clk, .rst, .stb_o(lhc_stb_o), .phase_o(unused_phase));

  for (genvar g = 0; g < N_GBT; g++) begin : g_gbt
    localparam int unsigned PW = (g == 2 || g == 3) ? TP_W : LWORD_W;
    gbt_tx_sorter #(.PAYLOAD_W(PW)) u_sorter (
      .clk, .rst, .lhc_stb_i(lhc_stb_o), .ldata_i(lane[g]),
      .pattern_sel_i(pattern_sel[g]),
      .gbt_data_o(gbt_data_o[g]), .gbt_valid_o(gbt_valid_o[g]), .drop_o(drop[g]));
    sync2ff u_sel_sync (.clk(clk), .d(ctrl[0][g]), .q(pattern_sel[g]));
  end

  logic [21:0] stat_src;
  assign stat_src = {drop, overflow};

  for (genvar b = 0; b < 22; b++) begin : g_stat_sync
    sync2ff u_sync (.clk(ipb_clk), .d(stat_src[b]), .q(stat_sync[b]));
  end

  assign stat[0] = {10'b0, stat_sync};

  ipbus_ctrlreg #(.N_CTRL(1), .N_STAT(1)) u_regs (
    .clk(ipb_clk), .rst(ipb_rst), .ipb_i, .ipb_o, .ctrl_o(ctrl), .stat_i(stat));

endmodule
