// tb_link_protocol: end-to-end test of the link protocol at its default
// sizes, looped through the behavioural transceiver model (gth_model).
// Software actions go through the IPbus register bank, as in the link test:
// it resets everything, waits for the initialization, reads synclock,
// starts the counter messages, injects CRC errors, sets a loopback mode,
// resets the RX datapath and the PLL/TX side, and holds the PLL out of lock
// once so the sequencer must retry. Checks: init_done and sync are reached
// (with at least one gearbox slip from the random cut of the line); status
// bits 0..2 show synclock, crc_match and init_done; received messages are
// the words 0..30 in order; crc_error pulses only while injection is on and
// sync is regained afterwards; gt_loopback follows control bits 6:4; each
// reset brings the link back; a lock timeout increments the retry count.
module tb_link_protocol;
  import ipbus_pkg::*;
  logic clk_free = 0, uclk = 0, ipb_clk = 0;
  logic rst_free = 1, ipb_rst = 1, reset_all = 1;
  ipb_wbus_t wb = IPB_WBUS_NULL;
  ipb_rbus_t rb;
  logic pll_rst, tx_rst, rx_rst, lock, txd, rxd;
  logic [2:0] lb;
  logic [63:0] txdata, rxdata, udata;
  logic [1:0] txhdr, rxhdr;
  logic [6:0] txseq;
  logic rxdv, rxhv, slip, uvalid, sync_ok, crc_match, crc_error, init_done;
  logic [7:0] retries;
  bit lock_block = 0;
  int slips;
  int checks = 0, failures = 0;

  always #4  clk_free = ~clk_free;
  always #5  uclk = ~uclk;
  always #16 ipb_clk = ~ipb_clk;

  link_protocol dut (
    .clk_free, .rst_free, .reset_all_i(reset_all), .ipb_clk, .ipb_rst, .ipb_i(wb), .ipb_o(rb),
    .txusrclk2(uclk), .rxusrclk2(uclk),
    .gt_pll_reset_o(pll_rst), .gt_tx_datapath_reset_o(tx_rst), .gt_rx_datapath_reset_o(rx_rst),
    .gt_pll_lock_i(lock), .gt_tx_reset_done_i(txd), .gt_rx_reset_done_i(rxd),
    .gt_loopback_o(lb), .gt_txdata_o(txdata), .gt_txheader_o(txhdr), .gt_txsequence_o(txseq),
    .gt_rxdata_i(rxdata), .gt_rxheader_i(rxhdr), .gt_rxdatavalid_i(rxdv),
    .gt_rxheadervalid_i(rxhv), .gt_rxgearboxslip_o(slip),
    .rx_user_data_o(udata), .rx_user_valid_o(uvalid), .sync_ok_o(sync_ok),
    .crc_match_o(crc_match), .crc_error_o(crc_error), .init_done_o(init_done),
    .retry_count_o(retries));

  gth_model gt (.clk(uclk), .pll_reset_i(pll_rst), .tx_reset_i(tx_rst), .rx_reset_i(rx_rst),
                .lock_block_i(lock_block), .pll_lock_o(lock), .tx_reset_done_o(txd),
                .rx_reset_done_o(rxd), .loopback_i(lb), .txdata_i(txdata), .txheader_i(txhdr),
                .txsequence_i(txseq), .rxdata_o(rxdata), .rxheader_o(rxhdr),
                .rxdatavalid_o(rxdv), .rxheadervalid_o(rxhv), .rxgearboxslip_i(slip),
                .slips_o(slips));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ipb(input logic [31:0] addr, input bit wr, input logic [31:0] wd,
                     output logic [31:0] rd);
    @(negedge ipb_clk);
    wb = '{addr: addr, wdata: wd, strobe: 1'b1, write: wr};
    do @(negedge ipb_clk); while (!rb.ack && !rb.err);
    check(rb.ack, "IPbus access not acknowledged");
    rd = rb.rdata;
    wb = IPB_WBUS_NULL;
    @(negedge ipb_clk);
  endtask

  // received messages: 0, 1, ..., 30
  int last_w = -1, n_msgs = 0, n_crc_err = 0, n_rx_resets = 0, n_pll_resets = 0;
  bit inject_on = 0, prev_rx_rst = 0, prev_pll = 0;
  always @(posedge uclk) if (!reset_all) begin
    if (uvalid) begin
      check(udata < 31 && (udata == 0 || udata == 64'(last_w + 1) || last_w == -1),
            $sformatf("word %0d after %0d", udata, last_w));
      if (udata == 30 && last_w == 29) n_msgs++;
      last_w = int'(udata);
    end
    if (crc_error) begin
      check(inject_on, "crc_error without injection");
      n_crc_err++;
      last_w = -1;
    end
    if (!sync_ok) last_w = -1;
    if (rx_rst && !prev_rx_rst) n_rx_resets++;
    if (pll_rst && !prev_pll) n_pll_resets++;
    prev_rx_rst = rx_rst; prev_pll = pll_rst;
  end

  task automatic wait_sync(int limit, string what);
    int k;
    k = 0;
    while (!(sync_ok && init_done) && k < limit) begin @(negedge uclk); k++; end
    check(sync_ok && init_done, what);
  endtask

  initial begin
    logic [31:0] rd;
    int m0, r0, e0;
    repeat (10) @(negedge ipb_clk);
    rst_free = 0; ipb_rst = 0;
    repeat (5) @(negedge clk_free);
    reset_all = 0;
    wait_sync(50000, "no init_done and sync after power-up");
    check(slips > 0, "aligned without a gearbox slip");
    check(retries == 0, "retry without a fault");
    repeat (10) @(negedge ipb_clk);
    ipb(32'h1, 0, '0, rd);
    check(rd[0] && rd[2], $sformatf("status %h: synclock/init_done not set", rd));
    // counter messages
    ipb(32'h0, 1, 32'h1, rd);
    repeat (3000) @(negedge uclk);
    check(n_msgs > 20, $sformatf("only %0d complete messages", n_msgs));
    ipb(32'h1, 0, '0, rd);
    check(rd[1:0] == 2'b11, $sformatf("status %h: crc_match/synclock", rd));
    // CRC error injection
    inject_on = 1;
    ipb(32'h0, 1, 32'h9, rd);
    repeat (1000) @(negedge uclk);
    ipb(32'h0, 1, 32'h1, rd);
    repeat (200) @(negedge uclk);
    inject_on = 0;
    check(n_crc_err > 3, "no CRC errors while injecting");
    m0 = n_msgs;
    wait_sync(50000, "sync not regained after CRC errors");
    repeat (2000) @(negedge uclk);
    check(n_msgs > m0 + 10, "messages did not resume after CRC errors");
    // loopback control bits
    ipb(32'h0, 1, 32'h1 | (32'h2 << 4), rd);
    repeat (4) @(negedge uclk);
    check(lb == 3'b010, "loopback bits not on gt_loopback");
    ipb(32'h0, 1, 32'h1, rd);
    // RX datapath reset
    r0 = n_rx_resets;
    ipb(32'h0, 1, 32'h5, rd);
    ipb(32'h0, 1, 32'h1, rd);
    repeat (200) @(negedge uclk);
    check(n_rx_resets > r0, "rst_rx_datapath did not reset the RX datapath");
    m0 = n_msgs;
    wait_sync(50000, "sync not regained after RX reset");
    repeat (2000) @(negedge uclk);
    check(n_msgs > m0 + 10, "messages did not resume after RX reset");
    // PLL/TX reset with a PLL that fails to lock once
    e0 = retries; r0 = n_pll_resets;
    lock_block = 1;
    ipb(32'h0, 1, 32'h3, rd);
    ipb(32'h0, 1, 32'h1, rd);
    repeat (5000) @(negedge clk_free);
    check(int'(retries) > e0, "lock timeout not retried");
    check(!init_done, "init_done without PLL lock");
    lock_block = 0;
    m0 = n_msgs;
    wait_sync(50000, "sync not regained after the PLL locked");
    repeat (2000) @(negedge uclk);
    check(n_msgs > m0 + 10, "messages did not resume after the PLL reset");
    check(n_pll_resets > r0, "rst_tx_datapath_pll did not reset the PLL");
    $display("messages %0d, CRC errors %0d, slips %0d, retries %0d", n_msgs, n_crc_err, slips, retries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
