// link_protocol: the synchronous 64b/66b link protocol around one
// transceiver channel, with its test source and control registers.
//
// Data path: link_userside produces counter messages on txusrclk2;
// link_tx appends the CRC, fills idle slots with sync words, scrambles, and
// drives the transceiver's TX gearbox (txdata, 2-bit header, txsequence).
// On the receive side link_rx descrambles the RX gearbox output, aligns it
// with rxgearboxslip, checks the CRC, and delivers the user words on
// rxusrclk2. User data and the transceiver's TX interface share txusrclk2,
// which is what makes the protocol synchronous.
//
// Control: link_init, on the free-running clock, sequences the PLL and
// datapath resets and watches the receiver's sync flag. An IPbus
// control/status register bank (IPbus clock) gives software the controls of
// the link test address table:
//   0x0 control: bit0 write_bit_user (enables the userside source),
//                bit1 rst_tx_datapath_pll, bit2 rst_rx_datapath,
//                bit3 usercrcerror (CRC error injection), bits 6:4 loopback
//   0x1 status:  bit0 synclock; bit1 crc_match and bit2 init_done are
//                additions of this design
// All single-bit signals that change clock domain pass through two-flop
// synchronisers. The TX logic is reset by reset_all or while the TX side is
// not done with its reset (tx_active low); the RX logic likewise with the RX
// side's reset-done flag.
//
// The transceiver itself (PMA/PCS, gearboxes, PLL, loopback paths) is not
// part of this module; its ports are gt_*. gt_loopback_o uses the
// transceiver's encoding: 000 normal, 001 near-end PCS, 010 near-end PMA,
// 100 far-end PMA, 110 far-end PCS.
module link_protocol
  import link_pkg::*;
  import ipbus_pkg::*;
#(
  parameter int unsigned DATA_WORDS         = 31,
  parameter int unsigned PERIOD             = 64,
  parameter int unsigned RESET_HOLD         = 16,
  parameter int unsigned PLL_LOCK_TIMEOUT   = 4096,
  parameter int unsigned RESET_DONE_TIMEOUT = 4096,
  parameter int unsigned DATA_GOOD_TIMEOUT  = 65536
) (
  input  logic             clk_free,
  input  logic             rst_free,
  input  logic             reset_all_i,
  input  logic             ipb_clk,
  input  logic             ipb_rst,
  input  ipb_wbus_t        ipb_i,
  output ipb_rbus_t        ipb_o,
  input  logic             txusrclk2,
  input  logic             rxusrclk2,
  output logic             gt_pll_reset_o,
  output logic             gt_tx_datapath_reset_o,
  output logic             gt_rx_datapath_reset_o,
  input  logic             gt_pll_lock_i,
  input  logic             gt_tx_reset_done_i,
  input  logic             gt_rx_reset_done_i,
  output logic [2:0]       gt_loopback_o,
  output logic [63:0]      gt_txdata_o,
  output logic [1:0]       gt_txheader_o,
  output logic [SEQ_W-1:0] gt_txsequence_o,
  input  logic [63:0]      gt_rxdata_i,
  input  logic [1:0]       gt_rxheader_i,
  input  logic             gt_rxdatavalid_i,
  input  logic             gt_rxheadervalid_i,
  output logic             gt_rxgearboxslip_o,
  output logic [63:0]      rx_user_data_o,
  output logic             rx_user_valid_o,
  output logic             sync_ok_o,
  output logic             crc_match_o,
  output logic             crc_error_o,
  output logic             init_done_o,
  output logic [7:0]       retry_count_o
);

  logic [31:0] ctrl [1];
  logic [31:0] stat [1];
  logic        user_en, inject, tx_rst_req, rx_rst_req, user_rst;
  logic [63:0] user_data;
  logic        user_valid, user_ready, unused_stop;
  logic        synclock_ipb, crc_match_ipb, init_done_ipb;

  // ------------------------------------------------------------ control
  ipbus_ctrlreg #(.N_CTRL(1), .N_STAT(1)) u_regs (
    .clk(ipb_clk), .rst(ipb_rst), .ipb_i, .ipb_o, .ctrl_o(ctrl), .stat_i(stat));

  sync2ff u_sy_sync  (.clk(ipb_clk), .d(sync_ok_o),   .q(synclock_ipb));
  sync2ff u_sy_crc   (.clk(ipb_clk), .d(crc_match_o), .q(crc_match_ipb));
  sync2ff u_sy_init  (.clk(ipb_clk), .d(init_done_o), .q(init_done_ipb));
  assign stat[0] = {29'b0, init_done_ipb, crc_match_ipb, synclock_ipb};

  assign gt_loopback_o = ctrl[0][CTRL_LOOPBACK +: 3];

  link_init #(
    .RESET_HOLD(RESET_HOLD), .PLL_LOCK_TIMEOUT(PLL_LOCK_TIMEOUT),
    .RESET_DONE_TIMEOUT(RESET_DONE_TIMEOUT), .DATA_GOOD_TIMEOUT(DATA_GOOD_TIMEOUT)
  ) u_init (
    .clk(clk_free), .rst(rst_free),
    .reset_all_i, .reset_tx_i(ctrl[0][CTRL_RST_TX]), .reset_rx_i(ctrl[0][CTRL_RST_RX]),
    .pll_lock_i(gt_pll_lock_i), .tx_reset_done_i(gt_tx_reset_done_i),
    .rx_reset_done_i(gt_rx_reset_done_i), .rx_data_good_i(sync_ok_o),
    .pll_reset_o(gt_pll_reset_o), .tx_datapath_reset_o(gt_tx_datapath_reset_o),
    .rx_datapath_reset_o(gt_rx_datapath_reset_o), .init_done_o, .retry_count_o);

  // ------------------------------------------------------------ transmit
  assign tx_rst_req = reset_all_i || !gt_tx_reset_done_i;
  assign rx_rst_req = reset_all_i || !gt_rx_reset_done_i;

  sync2ff u_tx_en  (.clk(txusrclk2), .d(ctrl[0][CTRL_WRITE_USER]), .q(user_en));
  sync2ff u_tx_inj (.clk(txusrclk2), .d(ctrl[0][CTRL_CRC_ERROR]),  .q(inject));
  sync2ff #(.RESET_VAL(1'b1)) u_tx_rst (.clk(txusrclk2), .d(tx_rst_req), .q(user_rst));

  link_userside #(.DATA_WORDS(DATA_WORDS), .PERIOD(PERIOD)) u_user (
    .clk(txusrclk2), .rst(user_rst), .enable_i(user_en), .ready_i(user_ready),
    .data_o(user_data), .valid_o(user_valid));

  link_tx u_tx (
    .clk(txusrclk2), .rst_req_i(tx_rst_req),
    .user_data_i(user_data), .user_valid_i(user_valid), .user_ready_o(user_ready),
    .crc_err_inject_i(inject),
    .txdata_o(gt_txdata_o), .txheader_o(gt_txheader_o), .txsequence_o(gt_txsequence_o),
    .stopdata_o(unused_stop));

  // ------------------------------------------------------------ receive
  link_rx u_rx (
    .clk(rxusrclk2), .rst_req_i(rx_rst_req),
    .rxdata_i(gt_rxdata_i), .rxheader_i(gt_rxheader_i),
    .rxdatavalid_i(gt_rxdatavalid_i), .rxheadervalid_i(gt_rxheadervalid_i),
    .rxgearboxslip_o(gt_rxgearboxslip_o), .sync_ok_o, .crc_match_o, .crc_error_o,
    .rxdata_o(rx_user_data_o), .rxdata_valid_o(rx_user_valid_o));

endmodule
