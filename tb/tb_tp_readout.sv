// tb_tp_readout: self-checking test of tp_readout, run on two instances fed
// with the same TPs: one at the default 64-bit TP width and one with 68-bit
// TPs, which must leave as two lwords. Each TP carries its chamber number and
// a sequence number. Reference: one queue per chamber. Checks: each TP leaves
// whole and in order on the lane of its chamber pair (chambers 0-1 on lane 0,
// 2-3 on lane 1); a 64-bit TP is one lword with start and last set; a 68-bit
// TP is a start word with the 64 LSBs followed in the next cycle by a last
// word with the 4 MSBs; TPs on a lane are at least 9 cycles apart; the
// latency of a lone TP is 3 cycles (4 for a split TP's first part); with both
// chambers of a pair busy their TPs alternate; a flood raises all four
// overflow flags.
module tb_tp_readout;
  import readout_pkg::*;
  localparam int unsigned WW = 68;
  logic clk = 0, rst = 1;
  logic [WW-1:0] tps [4];
  logic [63:0]   tps64 [4];
  lword_t lane [2][2];          // [instance][lane]
  logic [3:0] ovf [2];
  int checks = 0, failures = 0;
  int cyc = 0;
  bit checking = 1, flood = 0;
  int n_in [2] = '{0, 0}, n_out [2] = '{0, 0};
  int alternations = 0, splits = 0;

  always_comb for (int k = 0; k < 4; k++) tps64[k] = tps[k][63:0];

  tp_readout dut64 (.clk, .rst, .tps_i(tps64), .lane_o(lane[0]), .overflow_o(ovf[0]));
  tp_readout #(.TP_W(WW)) dut68 (.clk, .rst, .tps_i(tps), .lane_o(lane[1]), .overflow_o(ovf[1]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WW-1:0] mk_tp(int ch, int seq);
    return {4'($urandom), 4'hA, 4'(ch), 24'(seq), 32'($urandom)};
  endfunction

  logic [WW-1:0] expq [2][4][$];
  logic [63:0]   low_q [2];
  bit            pend [2][2];
  int            last_out [2][2];
  int            last_ch [2][2];

  initial for (int d = 0; d < 2; d++) for (int o = 0; o < 2; o++) begin
    pend[d][o] = 0; last_out[d][o] = -100; last_ch[d][o] = -1;
  end

  task automatic take(int d, int o, logic [WW-1:0] tp);
    int ch;
    ch = int'(tp[59:56]);
    check(ch / 2 == o, $sformatf("inst %0d: TP of chamber %0d on lane %0d", d, ch, o));
    if (checking) begin
      check(expq[d][ch].size() > 0 && tp == expq[d][ch][0],
            $sformatf("inst %0d lane %0d: TP %h out of order", d, o, tp));
      check(cyc - last_out[d][o] >= 9, "lane faster than one TP per LHC clock");
    end
    if (expq[d][ch].size() > 0) void'(expq[d][ch].pop_front());
    if (flood && last_ch[d][o] >= 0)
      check(ch != last_ch[d][o], "busy chamber pair did not alternate");
    if (last_ch[d][o] >= 0 && ch != last_ch[d][o]) alternations++;
    last_ch[d][o] = ch;
    last_out[d][o] = cyc;
    n_out[d]++;
  endtask

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      for (int k = 0; k < 4; k++) if (tps[k] != '0) begin
        expq[0][k].push_back(WW'(tps[k][63:0]));
        expq[1][k].push_back(tps[k]);
        n_in[0]++; n_in[1]++;
      end
      for (int o = 0; o < 2; o++) begin
        // 64-bit instance: one lword per TP
        if (lane[0][o].valid) begin
          check(lane[0][o].start && lane[0][o].last, "64-bit TP not a one-word packet");
          take(0, o, WW'(lane[0][o].data));
        end
        // 68-bit instance: start word, then last word in the next cycle
        if (pend[1][o]) begin
          check(lane[1][o].valid && lane[1][o].last && !lane[1][o].start,
                "second part of a split TP missing");
          check(lane[1][o].data[63:4] == '0, "second part carries more than 4 bits");
          take(1, o, {lane[1][o].data[3:0], low_q[o]});
          pend[1][o] = 0;
          splits++;
        end else if (lane[1][o].valid) begin
          check(lane[1][o].start && !lane[1][o].last, "first part of a split TP flags");
          low_q[o] = lane[1][o].data;
          pend[1][o] = 1;
        end
      end
    end
  end

  initial begin
    int t0;
    for (int k = 0; k < 4; k++) tps[k] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(negedge clk);
    // latency of a lone TP on chamber 2 (lane 1)
    tps[2] = mk_tp(2, 0); t0 = cyc;
    @(negedge clk); tps[2] = '0;
    while (!lane[0][1].valid) @(negedge clk);
    check(cyc - t0 == 3, $sformatf("TP latency %0d, expected 3", cyc - t0));
    @(negedge clk);
    check(lane[1][1].valid && lane[1][1].start, "split TP not leaving one cycle later");
    repeat (20) @(negedge clk);
    // random traffic at about the rate the lanes can carry
    for (int i = 1; i < 4000; i++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) tps[k] = ($urandom % 100 < 4) ? mk_tp(k, i) : '0;
    end
    @(negedge clk);
    for (int k = 0; k < 4; k++) tps[k] = '0;
    repeat (6000) @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      check(n_out[d] == n_in[d], $sformatf("inst %0d: TPs out %0d, in %0d", d, n_out[d], n_in[d]));
      check(ovf[d] == '0, "overflow during random traffic");
    end
    // flood: every chamber every cycle; pairs must alternate, FIFOs overflow
    checking = 0;
    for (int i = 0; i < 1200; i++) begin
      @(negedge clk);
      if (i == 20) flood = 1;
      for (int k = 0; k < 4; k++) tps[k] = mk_tp(k, i);
    end
    for (int d = 0; d < 2; d++) check(ovf[d] == 4'hF, $sformatf("inst %0d overflow flags %b", d, ovf[d]));
    check(alternations > 100, "alternation never exercised");
    check(splits > 100, "split TPs never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
