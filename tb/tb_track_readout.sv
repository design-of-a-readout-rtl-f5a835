// tb_track_readout: self-checking test of track_readout at its default sizes.
// Link 0 carries tracks in the CSP pattern (up to eight per LHC clock of
// nine clkp cycles, the ninth word zero); links 1-3 carry unrelated words,
// which must be ignored. Reference: one queue of the non-zero valid words of
// link 0. Checks: the words leave in order when lane 0 and lane 1 are read
// as one stream; a lane-1 word follows a lane-0 word by exactly one cycle;
// lane-0 words are at least 9 cycles apart; a lone track takes 3 cycles;
// nothing is lost under random load; a flood raises overflow.
module tb_track_readout;
  import readout_pkg::*;
  logic clk = 0, rst = 1;
  lword_t links [4];
  lword_t lane [2];
  logic ovf;
  int checks = 0, failures = 0;
  int cyc = 0, n_in = 0, n_out = 0, demux = 0;
  int last0 = -100;
  bit checking = 1;
  logic [63:0] expq [$];

  track_readout dut (.clk, .rst, .ldata_i(links), .lane_o(lane), .overflow_o(ovf));

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

  task automatic take(logic [63:0] d);
    if (checking) begin
      check(expq.size() > 0 && d == expq[0], $sformatf("track %h out of order", d));
      if (expq.size() > 0) void'(expq.pop_front());
    end
    n_out++;
  endtask

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (links[0].valid && links[0].data != '0) begin expq.push_back(links[0].data); n_in++; end
      if (lane[0].valid) begin
        check(lane[0].start && lane[0].last, "lane 0 word flags");
        if (checking) check(cyc - last0 >= 9, "lane 0 faster than one word per LHC clock");
        take(lane[0].data);
      end
      if (lane[1].valid) begin
        check(lane[1].start && lane[1].last, "lane 1 word flags");
        check(cyc - last0 == 1, "lane 1 word not one cycle after lane 0");
        take(lane[1].data);
        demux++;
      end
      if (lane[0].valid) last0 = cyc;
    end
  end

  function automatic lword_t mk(logic [63:0] d);
    return '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1, data: d};
  endfunction

  initial begin
    int t0;
    for (int l = 0; l < 4; l++) links[l] = LWORD_NULL;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(negedge clk);
    // latency of one track
    links[0] = mk(64'hACE0_0000_0000_0001); t0 = cyc;
    @(negedge clk); links[0] = LWORD_NULL;
    while (!lane[0].valid) @(negedge clk);
    check(cyc - t0 == 3, $sformatf("track latency %0d, expected 3", cyc - t0));
    check(lane[0].data == 64'hACE0_0000_0000_0001, "lone track data");
    repeat (20) @(negedge clk);
    // random load below two words per LHC clock on average
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (i % 9 == 8) links[0] = mk('0);
      else links[0] = ($urandom % 100 < 18) ? mk({32'hACE1_0000, 32'(i)}) : LWORD_NULL;
      for (int l = 1; l < 4; l++) links[l] = mk({$urandom, $urandom});
    end
    @(negedge clk);
    for (int l = 0; l < 4; l++) links[l] = LWORD_NULL;
    repeat (3000) @(negedge clk);
    check(n_out == n_in, $sformatf("tracks out %0d, in %0d", n_out, n_in));
    check(!ovf, "overflow under random load");
    check(demux > 50, "lane 1 never used");
    // flood: eight tracks per LHC clock fills the FIFO
    checking = 0;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      links[0] = (i % 9 == 8) ? mk('0) : mk({32'hACE2_0000, 32'(i)});
    end
    check(ovf, "overflow not raised by a flood");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
