// bmtl1_thesis_top: the two designs of this repository side by side.
//
//  - readout_system: the BMTL1 readout. Hits, trigger primitives and tracks
//    of one sector are buffered in 16 block-RAM FIFOs, sorted onto six lanes
//    and sent as 84-bit GBT frames, one per LHC clock per link, towards the
//    DAQ. Ports ro_*.
//  - link_protocol: a synchronous 64b/66b link protocol (CRC-32, scrambler,
//    gearbox alignment, reset sequencing) around one transceiver channel.
//    Ports lk_*.
// The two share no logic and no signal; each keeps its own clocks, resets
// and IPbus register port. All parameters are at their defaults.
module bmtl1_thesis_top
  import readout_pkg::*;
  import link_pkg::*;
  import ipbus_pkg::*;
(
  // readout system (clkp domain, IPbus domain)
  input  logic                   ro_clkp,
  input  logic                   ro_rst,
  input  logic [HIT_W-1:0]       ro_hits_i      [N_HIT_IN],
  input  logic [TPG_READOUT_SIZE-1:0] ro_tps_i  [N_TP],
  input  lword_t                 ro_csp_ldata_i [N_CSP_LINKS],
  input  logic                   ro_ipb_clk,
  input  logic                   ro_ipb_rst,
  input  ipb_wbus_t              ro_ipb_i,
  output ipb_rbus_t              ro_ipb_o,
  output logic [GBT_FRAME_W-1:0] ro_gbt_data_o  [N_GBT],
  output logic [N_GBT-1:0]       ro_gbt_valid_o,
  output logic                   ro_lhc_stb_o,
  // link protocol
  input  logic                   lk_clk_free,
  input  logic                   lk_rst_free,
  input  logic                   lk_reset_all_i,
  input  logic                   lk_ipb_clk,
  input  logic                   lk_ipb_rst,
  input  ipb_wbus_t              lk_ipb_i,
  output ipb_rbus_t              lk_ipb_o,
  input  logic                   lk_txusrclk2,
  input  logic                   lk_rxusrclk2,
  output logic                   lk_gt_pll_reset_o,
  output logic                   lk_gt_tx_datapath_reset_o,
  output logic                   lk_gt_rx_datapath_reset_o,
  input  logic                   lk_gt_pll_lock_i,
  input  logic                   lk_gt_tx_reset_done_i,
  input  logic                   lk_gt_rx_reset_done_i,
  output logic [2:0]             lk_gt_loopback_o,
  output logic [63:0]            lk_gt_txdata_o,
  output logic [1:0]             lk_gt_txheader_o,
  output logic [SEQ_W-1:0]       lk_gt_txsequence_o,
  input  logic [63:0]            lk_gt_rxdata_i,
  input  logic [1:0]             lk_gt_rxheader_i,
  input  logic                   lk_gt_rxdatavalid_i,
  input  logic                   lk_gt_rxheadervalid_i,
  output logic                   lk_gt_rxgearboxslip_o,
  output logic [63:0]            lk_rx_user_data_o,
  output logic                   lk_rx_user_valid_o,
  output logic                   lk_sync_ok_o,
  output logic                   lk_crc_match_o,
  output logic                   lk_crc_error_o,
  output logic                   lk_init_done_o,
  output logic [7:0]             lk_retry_count_o
);

  readout_system u_readout (
    .clk(ro_clkp), .rst(ro_rst),
    .hits_i(ro_hits_i), .tps_i(ro_tps_i), .csp_ldata_i(ro_csp_ldata_i),
    .ipb_clk(ro_ipb_clk), .ipb_rst(ro_ipb_rst), .ipb_i(ro_ipb_i), .ipb_o(ro_ipb_o),
    .gbt_data_o(ro_gbt_data_o), .gbt_valid_o(ro_gbt_valid_o), .lhc_stb_o(ro_lhc_stb_o));

  link_protocol u_link (
    .clk_free(lk_clk_free), .rst_free(lk_rst_free), .reset_all_i(lk_reset_all_i),
    .ipb_clk(lk_ipb_clk), .ipb_rst(lk_ipb_rst), .ipb_i(lk_ipb_i), .ipb_o(lk_ipb_o),
    .txusrclk2(lk_txusrclk2), .rxusrclk2(lk_rxusrclk2),
    .gt_pll_reset_o(lk_gt_pll_reset_o),
    .gt_tx_datapath_reset_o(lk_gt_tx_datapath_reset_o),
    .gt_rx_datapath_reset_o(lk_gt_rx_datapath_reset_o),
    .gt_pll_lock_i(lk_gt_pll_lock_i),
    .gt_tx_reset_done_i(lk_gt_tx_reset_done_i),
    .gt_rx_reset_done_i(lk_gt_rx_reset_done_i),
    .gt_loopback_o(lk_gt_loopback_o),
    .gt_txdata_o(lk_gt_txdata_o), .gt_txheader_o(lk_gt_txheader_o),
    .gt_txsequence_o(lk_gt_txsequence_o),
    .gt_rxdata_i(lk_gt_rxdata_i), .gt_rxheader_i(lk_gt_rxheader_i),
    .gt_rxdatavalid_i(lk_gt_rxdatavalid_i), .gt_rxheadervalid_i(lk_gt_rxheadervalid_i),
    .gt_rxgearboxslip_o(lk_gt_rxgearboxslip_o),
    .rx_user_data_o(lk_rx_user_data_o), .rx_user_valid_o(lk_rx_user_valid_o),
    .sync_ok_o(lk_sync_ok_o), .crc_match_o(lk_crc_match_o), .crc_error_o(lk_crc_error_o),
    .init_done_o(lk_init_done_o), .retry_count_o(lk_retry_count_o));

endmodule
