// tb_link_init: self-checking test of the link reset sequencer, with short
// hold and timeout values. The testbench plays the transceiver: the PLL
// locks a few cycles after its reset is released (or never, while the test
// blocks it), and each reset-done flag rises a few cycles after its
// datapath reset is released. Checks: after power-up the PLL reset comes
// first and both datapath resets are held while the PLL is in reset and
// until it has locked; init_done follows both reset-done flags; a PLL that
// does not lock is retried after the lock timeout (retry count grows); a
// lost receiver (rx_data_good low too long) resets the RX datapath only;
// reset_rx resets only the RX datapath, reset_tx the PLL and the TX
// datapath, reset_all everything.
module tb_link_init;
  localparam int HOLD = 4, LOCK_TO = 64, DONE_TO = 64, GOOD_TO = 200;
  logic clk = 0, rst = 1;
  logic reset_all = 0, reset_tx = 0, reset_rx = 0;
  logic lock = 0, txd = 0, rxd = 0, good = 0;
  logic pll_rst, tx_rst, rx_rst, done;
  logic [7:0] retries;
  bit block_lock = 0;
  int checks = 0, failures = 0;
  int lock_cnt = 0, txd_cnt = 0, rxd_cnt = 0;
  int n_pll_resets = 0, n_tx_resets = 0, n_rx_resets = 0;
  bit prev_pll = 0, prev_tx = 0, prev_rx = 0;

  link_init #(.RESET_HOLD(HOLD), .PLL_LOCK_TIMEOUT(LOCK_TO), .RESET_DONE_TIMEOUT(DONE_TO),
              .DATA_GOOD_TIMEOUT(GOOD_TO)) dut (
    .clk, .rst, .reset_all_i(reset_all), .reset_tx_i(reset_tx), .reset_rx_i(reset_rx),
    .pll_lock_i(lock), .tx_reset_done_i(txd), .rx_reset_done_i(rxd), .rx_data_good_i(good),
    .pll_reset_o(pll_rst), .tx_datapath_reset_o(tx_rst), .rx_datapath_reset_o(rx_rst),
    .init_done_o(done), .retry_count_o(retries));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transceiver stand-in and rule checks
  always @(posedge clk) if (!rst) begin
    if (pll_rst) begin lock_cnt = 0; lock <= 0; end
    else if (block_lock) lock_cnt = 0;
    else if (lock_cnt < 10) lock_cnt++; else lock <= 1;
    if (tx_rst || !lock) begin txd_cnt = 0; txd <= 0; end
    else if (txd_cnt < 6) txd_cnt++; else txd <= 1;
    if (rx_rst || !lock) begin rxd_cnt = 0; rxd <= 0; end
    else if (rxd_cnt < 8) rxd_cnt++; else rxd <= 1;
    if (done) check(txd && rxd && lock, "init_done without both reset-done flags and lock");
    if (pll_rst && !prev_pll) n_pll_resets++;
    if (tx_rst && !prev_tx) n_tx_resets++;
    if (rx_rst && !prev_rx) n_rx_resets++;
    prev_pll = pll_rst; prev_tx = tx_rst; prev_rx = rx_rst;
  end

  task automatic wait_done(int limit, string what);
    int k;
    k = 0;
    while (!done && k < limit) begin @(negedge clk); k++; end
    check(done, what);
  endtask

  initial begin
    int r0, p0, t0, x0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(pll_rst && tx_rst && rx_rst, "power-up: PLL and both datapaths not in reset");
    // datapath resets stay on while the PLL is unlocked
    while (pll_rst) @(negedge clk);
    while (!lock) begin
      check(tx_rst && rx_rst, "datapath released before PLL lock");
      @(negedge clk);
    end
    wait_done(500, "init_done not reached after power-up");
    check(retries == 0, "retry without a fault");
    good = 1;
    repeat (400) @(negedge clk);
    check(done, "init_done lost while the receiver is good");
    // PLL that does not lock: retried after the timeout
    block_lock = 1;
    reset_tx = 1; repeat (4) @(negedge clk); reset_tx = 0;
    repeat (3 * (LOCK_TO + HOLD) + 20) @(negedge clk);
    check(retries >= 2, $sformatf("lock timeout retries %0d", retries));
    check(!done, "init_done without PLL lock");
    block_lock = 0;
    wait_done(1000, "init_done not reached after the PLL locked");
    // receiver loss: only the RX datapath is reset
    r0 = retries; p0 = n_pll_resets; t0 = n_tx_resets; x0 = n_rx_resets;
    good = 0;
    repeat (GOOD_TO + 10) @(negedge clk);
    check(retries == r0 + 1, "link loss not counted as a retry");
    check(n_rx_resets == x0 + 1 && n_tx_resets == t0 && n_pll_resets == p0,
          "link loss did not reset exactly the RX datapath");
    good = 1;
    wait_done(500, "init_done not back after link loss");
    // reset groups
    p0 = n_pll_resets; t0 = n_tx_resets; x0 = n_rx_resets;
    reset_rx = 1; repeat (3) @(negedge clk); reset_rx = 0;
    wait_done(500, "no init_done after reset_rx");
    check(n_rx_resets == x0 + 1 && n_tx_resets == t0 && n_pll_resets == p0, "reset_rx group");
    p0 = n_pll_resets; t0 = n_tx_resets; x0 = n_rx_resets;
    reset_tx = 1; repeat (3) @(negedge clk); reset_tx = 0;
    wait_done(500, "no init_done after reset_tx");
    check(n_rx_resets == x0 && n_tx_resets == t0 + 1 && n_pll_resets == p0 + 1, "reset_tx group");
    p0 = n_pll_resets; t0 = n_tx_resets; x0 = n_rx_resets;
    reset_all = 1; repeat (3) @(negedge clk); reset_all = 0;
    wait_done(500, "no init_done after reset_all");
    check(n_rx_resets == x0 + 1 && n_tx_resets == t0 + 1 && n_pll_resets == p0 + 1, "reset_all group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
