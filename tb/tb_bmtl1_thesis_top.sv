// tb_bmtl1_thesis_top: end-to-end test of the top level with every
// parameter at its default. The readout and the link protocol run at the
// same time, each driven like in the laboratory: the readout receives
// tagged hits, TPs and tracks of one sector and its GBT frames are checked
// against a table of the words sent, while its IPbus port switches links to
// the test pattern and reads the overflow flags; the link, looped through
// the behavioural transceiver model, is initialized, aligned, carries
// counter messages, sees injected CRC errors, an RX reset and a PLL that
// fails to lock once. Each mechanism is counted and must happen at least
// once: hit-lane alternation, track demultiplexing onto the second lane,
// FIFO overflow, test-pattern mode, gearbox slip, sync lock, CRC match, CRC
// error, RX datapath reset and initialization retry.
module tb_bmtl1_thesis_top;
  import readout_pkg::*;
  import ipbus_pkg::*;

  // ------------------------------------------------------------ readout side
  logic clkp = 0, ro_rst = 1, ro_ipb_clk = 0, ro_ipb_rst = 1;
  logic [31:0] hits [13];
  logic [63:0] tps [4];
  lword_t csp [4];
  ipb_wbus_t ro_wb = IPB_WBUS_NULL;
  ipb_rbus_t ro_rb;
  logic [83:0] gbt [6];
  logic [5:0] gvalid;
  logic stb;

  // ------------------------------------------------------------ link side
  logic clk_free = 0, uclk = 0, lk_ipb_clk = 0;
  logic rst_free = 1, lk_ipb_rst = 1, reset_all = 1;
  ipb_wbus_t lk_wb = IPB_WBUS_NULL;
  ipb_rbus_t lk_rb;
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

  always #5  clkp = ~clkp;
  always #16 ro_ipb_clk = ~ro_ipb_clk;
  always #4  clk_free = ~clk_free;
  always #6  uclk = ~uclk;
  always #15 lk_ipb_clk = ~lk_ipb_clk;

  bmtl1_thesis_top dut (
    .ro_clkp(clkp), .ro_rst, .ro_hits_i(hits), .ro_tps_i(tps), .ro_csp_ldata_i(csp),
    .ro_ipb_clk, .ro_ipb_rst, .ro_ipb_i(ro_wb), .ro_ipb_o(ro_rb),
    .ro_gbt_data_o(gbt), .ro_gbt_valid_o(gvalid), .ro_lhc_stb_o(stb),
    .lk_clk_free(clk_free), .lk_rst_free(rst_free), .lk_reset_all_i(reset_all),
    .lk_ipb_clk, .lk_ipb_rst, .lk_ipb_i(lk_wb), .lk_ipb_o(lk_rb),
    .lk_txusrclk2(uclk), .lk_rxusrclk2(uclk),
    .lk_gt_pll_reset_o(pll_rst), .lk_gt_tx_datapath_reset_o(tx_rst),
    .lk_gt_rx_datapath_reset_o(rx_rst), .lk_gt_pll_lock_i(lock),
    .lk_gt_tx_reset_done_i(txd), .lk_gt_rx_reset_done_i(rxd), .lk_gt_loopback_o(lb),
    .lk_gt_txdata_o(txdata), .lk_gt_txheader_o(txhdr), .lk_gt_txsequence_o(txseq),
    .lk_gt_rxdata_i(rxdata), .lk_gt_rxheader_i(rxhdr), .lk_gt_rxdatavalid_i(rxdv),
    .lk_gt_rxheadervalid_i(rxhv), .lk_gt_rxgearboxslip_o(slip),
    .lk_rx_user_data_o(udata), .lk_rx_user_valid_o(uvalid), .lk_sync_ok_o(sync_ok),
    .lk_crc_match_o(crc_match), .lk_crc_error_o(crc_error), .lk_init_done_o(init_done),
    .lk_retry_count_o(retries));

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
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  typedef enum int {
    M_ALTERNATE, M_DEMUX, M_OVERFLOW, M_PATTERN, M_SLIP, M_SYNC, M_CRC_MATCH,
    M_CRC_ERROR, M_RX_RESET, M_RETRY, M_N
  } mech_t;
  int mech [M_N];
  string mech_name [M_N] = '{"hit-lane alternation", "track demultiplexing", "FIFO overflow",
                             "test-pattern mode", "gearbox slip", "sync lock", "CRC match",
                             "CRC error", "RX datapath reset", "init retry"};

  task automatic ro_ipb(input logic [31:0] addr, input bit wr, input logic [31:0] wd,
                        output logic [31:0] rd);
    @(negedge ro_ipb_clk);
    ro_wb = '{addr: addr, wdata: wd, strobe: 1'b1, write: wr};
    do @(negedge ro_ipb_clk); while (!ro_rb.ack && !ro_rb.err);
    check(ro_rb.ack, "readout IPbus access not acknowledged");
    rd = ro_rb.rdata;
    ro_wb = IPB_WBUS_NULL;
    @(negedge ro_ipb_clk);
  endtask

  task automatic lk_ipb(input logic [31:0] addr, input bit wr, input logic [31:0] wd,
                        output logic [31:0] rd);
    @(negedge lk_ipb_clk);
    lk_wb = '{addr: addr, wdata: wd, strobe: 1'b1, write: wr};
    do @(negedge lk_ipb_clk); while (!lk_rb.ack && !lk_rb.err);
    check(lk_rb.ack, "link IPbus access not acknowledged");
    rd = lk_rb.rdata;
    lk_wb = IPB_WBUS_NULL;
    @(negedge lk_ipb_clk);
  endtask

  // ============================================================ readout checks
  int expc [3][logic [63:0]];
  int n_in [3] = '{0, 0, 0}, n_out [3] = '{0, 0, 0};
  logic [5:0] sel_model = '0;
  bit counting = 1, stb_d = 0;
  int last_hit_fifo = -1;

  task automatic expect_word(int kind, logic [63:0] w);
    if (expc[kind].exists(w)) expc[kind][w]++; else expc[kind][w] = 1;
    n_in[kind]++;
  endtask

  always @(posedge clkp) if (!ro_rst) begin
    if (counting) begin
      for (int k = 0; k < 7; k++) begin
        logic [63:0] w;
        w = {(2*k+1 < 13) ? hits[2*k+1] : 32'h0, hits[2*k]};
        if (w != '0) expect_word(0, w);
      end
      for (int k = 0; k < 4; k++) if (tps[k] != '0) expect_word(1, tps[k]);
      if (csp[0].valid && csp[0].data != '0) expect_word(2, csp[0].data);
    end
    if (stb_d) for (int g = 0; g < 6; g++) begin
      if (gbt[g][83:24] == 60'hCAB_ABAB_ABAB_ABAB && !gvalid[g]) begin
        check(sel_model[g] || !counting, $sformatf("pattern on link %0d, not selected", g));
        if (counting) mech[M_PATTERN]++;
      end else begin
        check(!sel_model[g] || !counting, $sformatf("link %0d selected but no pattern", g));
        if (gvalid[g]) begin
          int kind;
          kind = g / 2;
          check(gbt[g][83:64] == '0, "frame not zero-extended");
          if (counting) begin
            check(expc[kind].exists(gbt[g][63:0]), $sformatf("link %0d: frame %h not expected", g, gbt[g]));
            if (expc[kind].exists(gbt[g][63:0])) begin
              expc[kind][gbt[g][63:0]]--;
              if (expc[kind][gbt[g][63:0]] == 0) expc[kind].delete(gbt[g][63:0]);
            end
          end
          n_out[kind]++;
          if (g == 0) begin
            int f;
            f = (gbt[0][31:0] != 0) ? int'(gbt[0][27:24]) / 2 : int'(gbt[0][59:56]) / 2;
            if (last_hit_fifo >= 0 && f != last_hit_fifo) mech[M_ALTERNATE]++;
            last_hit_fifo = f;
          end
          if (g == 5) mech[M_DEMUX]++;
        end else check(gbt[g] == '0, "empty frame not zero");
      end
    end
    stb_d = stb;
  end

  task automatic idle_inputs();
    for (int j = 0; j < 13; j++) hits[j] = '0;
    for (int k = 0; k < 4; k++) tps[k] = '0;
    for (int l = 0; l < 4; l++) csp[l] = LWORD_NULL;
  endtask

  task automatic readout_flow();
    logic [31:0] rd;
    ro_ipb(32'h0, 0, '0, rd); check(rd == '0, "readout control not zero after reset");
    // a run of sector data at a rate the links carry, with bursts on the hit lanes
    for (int i = 0; i < 6000; i++) begin
      @(negedge clkp);
      for (int j = 0; j < 13; j++)
        hits[j] = ($urandom % 1000 < ((i % 1000) < 40 ? 120 : 10)) ? {4'h8, 4'(j), 24'(i)} : '0;
      for (int k = 0; k < 4; k++) tps[k] = ($urandom % 100 < 3) ? {4'hB, 4'(k), 24'(i), 32'($urandom)} : '0;
      csp[0] = ($urandom % 100 < 12) ? '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1,
                                         data: {32'hC0DE_0000, 32'(i)}} : LWORD_NULL;
      for (int l = 1; l < 4; l++) csp[l] = csp[0];
    end
    @(negedge clkp); idle_inputs();
    repeat (6000) @(negedge clkp);
    for (int k = 0; k < 3; k++)
      check(n_out[k] == n_in[k] && n_in[k] > 50, $sformatf("kind %0d: frames %0d, words %0d", k, n_out[k], n_in[k]));
    ro_ipb(32'h1, 0, '0, rd); check(rd == '0, $sformatf("flags %h after a normal run", rd));
    // test pattern on the TP and track links
    counting = 0;
    ro_ipb(32'h0, 1, 32'h3C, rd);
    repeat (20) @(negedge clkp);
    sel_model = 6'h3C; counting = 1;
    repeat (300) @(negedge clkp);
    counting = 0;
    ro_ipb(32'h0, 1, 32'h0, rd);
    repeat (20) @(negedge clkp);
    sel_model = '0;
    // a track flood overflows the track FIFO
    for (int i = 0; i < 1500; i++) begin
      @(negedge clkp);
      csp[0] = '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1, data: {32'hC0DE_2222, 32'(i)}};
    end
    @(negedge clkp); idle_inputs();
    repeat (10) @(negedge ro_ipb_clk);
    ro_ipb(32'h1, 0, '0, rd);
    check(rd == 32'h0000_8000, $sformatf("status after track flood %h", rd));
    if (rd[15]) mech[M_OVERFLOW]++;
  endtask

  // ============================================================ link checks
  int last_w = -1, n_msgs = 0, n_rx_resets = 0;
  bit inject_on = 0, prev_rx_rst = 0, prev_sync = 0;
  int prev_slips = 0;
  always @(posedge uclk) if (!reset_all) begin
    if (uvalid) begin
      check(udata < 31 && (udata == 0 || udata == 64'(last_w + 1) || last_w == -1),
            $sformatf("link word %0d after %0d", udata, last_w));
      if (udata == 30 && last_w == 29) n_msgs++;
      last_w = int'(udata);
    end
    if (crc_error) begin
      check(inject_on, "crc_error without injection");
      mech[M_CRC_ERROR]++;
      last_w = -1;
    end
    if (!sync_ok) last_w = -1;
    if (sync_ok && !prev_sync) mech[M_SYNC]++;
    if (rx_rst && !prev_rx_rst) n_rx_resets++;
    if (slips != prev_slips) mech[M_SLIP]++;
    prev_slips = slips; prev_rx_rst = rx_rst; prev_sync = sync_ok;
  end

  task automatic wait_sync(int limit, string what);
    int k;
    k = 0;
    while (!(sync_ok && init_done) && k < limit) begin @(negedge uclk); k++; end
    check(sync_ok && init_done, what);
  endtask

  task automatic link_flow();
    logic [31:0] rd;
    int m0, r0, e0;
    wait_sync(50000, "no link init_done and sync after power-up");
    repeat (10) @(negedge lk_ipb_clk);
    lk_ipb(32'h1, 0, '0, rd);
    check(rd[0] && rd[2], $sformatf("link status %h: synclock/init_done not set", rd));
    lk_ipb(32'h0, 1, 32'h1, rd);
    repeat (3000) @(negedge uclk);
    check(n_msgs > 20, $sformatf("only %0d complete link messages", n_msgs));
    lk_ipb(32'h1, 0, '0, rd);
    check(rd[1:0] == 2'b11, $sformatf("link status %h: crc_match/synclock", rd));
    if (rd[1]) mech[M_CRC_MATCH]++;
    inject_on = 1;
    lk_ipb(32'h0, 1, 32'h9, rd);
    repeat (800) @(negedge uclk);
    lk_ipb(32'h0, 1, 32'h1, rd);
    repeat (200) @(negedge uclk);
    inject_on = 0;
    wait_sync(50000, "link sync not regained after CRC errors");
    r0 = n_rx_resets;
    lk_ipb(32'h0, 1, 32'h5, rd);
    lk_ipb(32'h0, 1, 32'h1, rd);
    repeat (200) @(negedge uclk);
    if (n_rx_resets > r0) mech[M_RX_RESET]++;
    wait_sync(50000, "link sync not regained after RX reset");
    e0 = retries;
    lock_block = 1;
    lk_ipb(32'h0, 1, 32'h3, rd);
    lk_ipb(32'h0, 1, 32'h1, rd);
    repeat (5000) @(negedge clk_free);
    if (int'(retries) > e0) mech[M_RETRY]++;
    lock_block = 0;
    m0 = n_msgs;
    wait_sync(50000, "link sync not regained after the PLL locked");
    repeat (2000) @(negedge uclk);
    check(n_msgs > m0 + 10, "link messages did not resume");
  endtask

  initial begin
    for (int m = 0; m < M_N; m++) mech[m] = 0;
    idle_inputs();
    repeat (6) @(negedge ro_ipb_clk);
    ro_rst = 0; ro_ipb_rst = 0; rst_free = 0; lk_ipb_rst = 0;
    repeat (5) @(negedge clk_free);
    reset_all = 0;
    fork
      readout_flow();
      link_flow();
    join
    for (int m = 0; m < M_N; m++) begin
      $display("%-22s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism never happened: %s", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
