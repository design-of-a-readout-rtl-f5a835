// tb_link_rx: self-checking test of the link receiver, behind the
// behavioural transceiver model (gth_model), which cuts the line at a
// random bit position after each RX reset. The testbench transmits with its
// own model of the protocol: messages of 1..31 numbered data words (header
// 01) closed by a CRC word, one to four sync words between messages,
// payloads scrambled with a bit-serial 1 + x^39 + x^58 model; every fifth
// message carries a wrong CRC. Checks: the receiver slips the gearbox until
// the blocks are aligned, never sooner than 32 words after the last slip;
// it reaches sync; the data words it delivers are the words sent, in order
// and complete within each message, two cycles after the gearbox gave them;
// crc_error pulses only after a bad message and is followed by loss of sync,
// while good messages leave crc_match high; after a second RX reset at a new
// bit position it locks again.
module tb_link_rx;
  logic clk = 0, rst_req = 1, gt_rx_reset = 1;
  logic [63:0] txdata = '0, rxdata, udata;
  logic [1:0] txhdr = 2'b10, rxhdr;
  logic [6:0] txseq = '0;
  logic rxdv, rxhv, slip, sync_ok, crc_match, crc_error, uvalid;
  logic lock, txdone, rxdone;
  int slips;
  int checks = 0, failures = 0;

  gth_model gt (.clk, .pll_reset_i(1'b0), .tx_reset_i(1'b0), .rx_reset_i(gt_rx_reset),
                .lock_block_i(1'b0), .pll_lock_o(lock), .tx_reset_done_o(txdone),
                .rx_reset_done_o(rxdone), .loopback_i(3'b0), .txdata_i(txdata),
                .txheader_i(txhdr), .txsequence_i(txseq), .rxdata_o(rxdata),
                .rxheader_o(rxhdr), .rxdatavalid_o(rxdv), .rxheadervalid_o(rxhv),
                .rxgearboxslip_i(slip), .slips_o(slips));

  link_rx dut (.clk, .rst_req_i(rst_req), .rxdata_i(rxdata), .rxheader_i(rxhdr),
               .rxdatavalid_i(rxdv), .rxheadervalid_i(rxhv), .rxgearboxslip_o(slip),
               .sync_ok_o(sync_ok), .crc_match_o(crc_match), .crc_error_o(crc_error),
               .rxdata_o(udata), .rxdata_valid_o(uvalid));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #6000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- TX model
  bit hist [$];
  function automatic logic [63:0] scramble(logic [63:0] w);
    logic [63:0] o;
    for (int b = 0; b < 64; b++) begin
      int n;
      n = hist.size();
      o[b] = w[b] ^ hist[n - 39] ^ hist[n - 58];
      hist.push_back(o[b]);
      void'(hist.pop_front());
    end
    return o;
  endfunction

  function automatic logic [31:0] crc_add(logic [31:0] c, logic [63:0] w);
    for (int b = 0; b < 64; b++) begin
      logic fb;
      fb = c[31] ^ w[b];
      c = c << 1;
      if (fb) c = c ^ 32'h04C11DB7;
    end
    return c;
  endfunction

  int msg = 0, idx = 0, len = 5, gap = 2;
  logic [31:0] crc = 32'hFFFFFFFF;
  bit bad_msg [int];

  // next block of the stream: data words, CRC word, then sync words
  task automatic next_block(output logic [63:0] w, output logic [1:0] h);
    if (idx < len) begin
      w = {32'(msg), 16'(idx), 16'($urandom)};
      h = 2'b01;
      crc = crc_add(crc, w);
      idx++;
    end else if (idx == len) begin
      bit bad;
      bad = (msg % 5) == 4;
      bad_msg[msg] = bad;
      w = {32'h0, crc[31] ^ bad, crc[30:0]};
      h = 2'b10;
      idx++;
    end else begin
      w = 64'h5555_5555_5555_5555;
      h = 2'b10;
      idx++;
      if (idx > len + gap) begin
        msg++; idx = 0; crc = 32'hFFFFFFFF;
        len = 1 + $urandom % 31; gap = 1 + $urandom % 4;
      end
    end
  endtask

  always @(posedge clk) begin
    logic [63:0] w;
    logic [1:0] h;
    txseq <= (txseq == 7'd32) ? '0 : txseq + 1'b1;
    if (txseq != 7'd32) begin
      next_block(w, h);
      txdata <= scramble(w);
      txhdr <= h;
    end
  end

  // ---------------------------------------------------------------- checks
  int n_slip = 0, words_since_slip = 0, n_words = 0, n_crc_err = 0, n_match_msgs = 0;
  int last_msg = -1, last_idx = -1, n_sync = 0;
  bit prev_sync = 0, expect_unsync = 0;
  bit hv [3];
  logic [1:0] hh [3];

  always @(posedge clk) if (!gt_rx_reset) begin
    // gearbox output history for the latency check
    hv[2] = hv[1]; hh[2] = hh[1]; hv[1] = hv[0]; hh[1] = hh[0];
    hv[0] = rxdv; hh[0] = rxhdr;
    if (rxdv) words_since_slip++;
    if (slip) begin
      if (n_slip > 0) check(words_since_slip >= 32, $sformatf("slip after %0d words", words_since_slip));
      n_slip++;
      words_since_slip = 0;
    end
    if (expect_unsync) begin check(!sync_ok, "sync kept after a CRC error"); expect_unsync = 0; end
    if (sync_ok && !prev_sync) n_sync++;
    prev_sync = sync_ok;
    if (uvalid) begin
      int m, i;
      m = int'(udata[63:32]); i = int'(udata[31:16]);
      check(hv[2] && hh[2] == 2'b01, "delivered word not from a data block two cycles earlier");
      if (m == last_msg) check(i == last_idx + 1, $sformatf("msg %0d: word %0d after %0d", m, i, last_idx));
      else begin
        check(m > last_msg && m <= msg, $sformatf("message %0d out of order", m));
        if (last_msg >= 0 && bad_msg.exists(last_msg) && !bad_msg[last_msg] && last_idx >= 0 && m == last_msg + 1)
          check(crc_match, "good message did not leave crc_match high");
        if (m == last_msg + 1 && bad_msg.exists(last_msg) && !bad_msg[last_msg]) n_match_msgs++;
      end
      last_msg = m; last_idx = i;
      n_words++;
    end
    if (crc_error) begin
      check(last_msg >= 0 && bad_msg.exists(last_msg) && bad_msg[last_msg],
            $sformatf("crc_error after message %0d, which was good", last_msg));
      n_crc_err++;
      expect_unsync = 1;
      last_idx = -100;            // a new lock starts a fresh message
    end
  end

  initial begin
    for (int i = 0; i < 58; i++) hist.push_back(1'($urandom));
    repeat (4) @(negedge clk);
    rst_req = 0; gt_rx_reset = 0;
    wait (sync_ok);
    check(n_slip > 0, "aligned without a slip");
    repeat (20000) @(negedge clk);
    check(n_words > 1000, "too few data words delivered");
    check(n_crc_err > 5, "CRC errors not detected");
    check(n_match_msgs > 20, "too few good messages");
    begin
      int s0, k;
      s0 = n_sync;
      // second lock from a new random bit position
      gt_rx_reset = 1; rst_req = 1;
      repeat (5) @(negedge clk);
      gt_rx_reset = 0; rst_req = 0;
      k = 0;
      while (!sync_ok && k < 200000) begin @(negedge clk); k++; end
      check(sync_ok, "no lock after the second reset");
      @(negedge clk);
      check(n_sync > s0, "sync count did not grow");
    end
    repeat (1000) @(negedge clk);
    $display("slips %0d, syncs %0d, words %0d, crc errors %0d", n_slip, n_sync, n_words, n_crc_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
