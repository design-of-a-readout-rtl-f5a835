// tb_hit_readout: self-checking test of hit_readout at its default sizes.
// Hits carry their input lane number, so the testbench knows which packed
// word (FIFO) each belongs to. Reference: one queue per packed word, in the
// order the words were formed. Checks: each output word equals the head of
// its source queue and leaves on the right lane (words 0-3 on lane 0, 4-6 on
// lane 1), words on a lane are at least 9 cycles apart, the one-hit latency
// is 7 cycles, inputs 6 and 8 leave on different lanes, and every hit comes
// out. A final flood of hits must raise the overflow flags of the first
// FIFOs, while back-pressure keeps the middle FIFOs from losing words.
module tb_hit_readout;
  import readout_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] hits [13];
  lword_t lane [2];
  logic [10:0] ovf;
  int checks = 0, failures = 0;

  hit_readout dut (.clk, .rst, .hits_i(hits), .lane_o(lane), .overflow_o(ovf));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mk_hit(int j, int seq);
    return {1'b1, 3'b0, 4'(j), 24'(seq)};
  endfunction

  logic [63:0] expq [7][$];
  int last_out [2] = '{-100, -100};
  int cyc = 0, n_in = 0, n_out = 0;
  bit checking = 1;

  // Reference: word k formed from the inputs seen at a clock edge.
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      for (int k = 0; k < 7; k++) begin
        logic [63:0] w;
        w = {(2*k+1 < 13) ? hits[2*k+1] : 32'h0, hits[2*k]};
        if (w != 0) begin expq[k].push_back(w); n_in++; end
      end
      for (int o = 0; o < 2; o++) if (lane[o].valid && checking) begin
        logic [63:0] d;
        int j, k;
        d = lane[o].data;
        j = (d[31:0] != 0) ? int'(d[27:24]) : int'(d[59:56]);
        k = j / 2;
        check((k < 4 ? 0 : 1) == o, $sformatf("word of FIFO %0d on lane %0d", k, o));
        check(expq[k].size() > 0 && d == expq[k][0], $sformatf("lane %0d word %h out of order", o, d));
        if (expq[k].size() > 0) void'(expq[k].pop_front());
        check(lane[o].start && lane[o].last, "one-word packet flags");
        check(cyc - last_out[o] >= 9, "lane faster than one word per LHC clock");
        last_out[o] = cyc;
        n_out++;
      end
    end
  end

  initial begin
    int t0;
    for (int j = 0; j < 13; j++) hits[j] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (20) @(posedge clk);
    // latency of one hit on input 0
    @(negedge clk); hits[0] = mk_hit(0, 1); t0 = cyc;
    @(negedge clk); hits[0] = '0;
    while (!lane[0].valid) @(negedge clk);
    check(cyc - t0 == 7, $sformatf("one-hit latency %0d, expected 7", cyc - t0));
    repeat (20) @(negedge clk);
    // the lanes 6 and 8 example: the two hits leave on different GBT lanes
    hits[6] = mk_hit(6, 2); hits[8] = mk_hit(8, 2);
    @(negedge clk); hits[6] = '0; hits[8] = '0;
    repeat (3) @(negedge clk);
    begin
      int seen0 = 0, seen1 = 0;
      repeat (20) begin
        @(negedge clk);
        if (lane[0].valid && lane[0].data[27:24] == 4'd6) seen0++;
        if (lane[1].valid && lane[1].data[27:24] == 4'd8) seen1++;
      end
      check(seen0 == 1 && seen1 == 1, "inputs 6 and 8 not on lanes 0 and 1");
    end
    // random sparse traffic, some cycles with both hits of a pair
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int j = 0; j < 13; j++) hits[j] = ($urandom % 100 < 2) ? mk_hit(j, i + 10) : '0;
    end
    @(negedge clk);
    for (int j = 0; j < 13; j++) hits[j] = '0;
    repeat (6000) @(negedge clk);
    check(n_out == n_in, $sformatf("words out %0d, in %0d", n_out, n_in));
    check(ovf == '0, "overflow during sparse traffic");
    // flood: every input, every cycle, until the FIFOs overflow
    checking = 0;
    for (int i = 0; i < 2500; i++) begin
      @(negedge clk);
      for (int j = 0; j < 13; j++) hits[j] = mk_hit(j, i);
    end
    check(ovf[6:0] == 7'h7f, $sformatf("first-stage FIFOs did not all report overflow: %b", ovf));
    check(ovf[10:7] == 4'h0, $sformatf("middle FIFOs lost words: %b", ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
