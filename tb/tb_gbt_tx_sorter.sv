// tb_gbt_tx_sorter: self-checking test of gbt_tx_sorter, on two instances:
// 64-bit payload (one lword per frame) and 68-bit payload (a start lword and
// a last lword joined into one frame). The LHC strobe comes from lhc_strobe,
// whose one-in-nine period is checked as well. Reference model: the word
// completed in the interval from one strobe cycle up to the next leaves in
// the frame updated at the next strobe, zero-extended to 84 bits with valid
// set; with no word the frame is zero and valid low (so the latency is 1 to
// 9 clkp cycles); a second word in one interval sets drop. In pattern mode
// the frame is 0xCABABABABABABAB above a 24-bit counter of LHC clocks.
module tb_gbt_tx_sorter;
  import readout_pkg::*;
  logic clk = 0, rst = 1;
  logic stb, pat = 0;
  logic [3:0] phase;
  lword_t ld [2];
  logic [GBT_FRAME_W-1:0] frame [2];
  logic fvalid [2], drop [2];
  int checks = 0, failures = 0;
  int n_frames = 0, n_pattern = 0, n_drops_model = 0, last_stb = -1, cyc = 0;
  bit allow_drop = 0;

  lhc_strobe #(.RATIO(9)) u_stb (.clk, .rst, .stb_o(stb), .phase_o(phase));

  gbt_tx_sorter dut64 (.clk, .rst, .lhc_stb_i(stb), .ldata_i(ld[0]), .pattern_sel_i(pat),
                       .gbt_data_o(frame[0]), .gbt_valid_o(fvalid[0]), .drop_o(drop[0]));
  gbt_tx_sorter #(.PAYLOAD_W(68)) dut68 (.clk, .rst, .lhc_stb_i(stb), .ldata_i(ld[1]),
                       .pattern_sel_i(pat), .gbt_data_o(frame[1]), .gbt_valid_o(fvalid[1]),
                       .drop_o(drop[1]));

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

  // reference model
  logic [GBT_FRAME_W-1:0] pend [2], exp_data [2];
  bit pend_v [2], exp_v [2], exp_drop [2], check_next = 0;
  logic [63:0] low [2];
  bit low_v = 0;
  logic [23:0] cnt = '0;

  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      for (int d = 0; d < 2; d++) begin pend_v[d] = 0; exp_drop[d] = 0; end
    end else begin
      for (int d = 0; d < 2; d++)
        check(drop[d] == exp_drop[d], $sformatf("inst %0d drop flag %0d expected %0d", d, drop[d], exp_drop[d]));
      if (check_next) begin
        for (int d = 0; d < 2; d++) begin
          check(frame[d] == exp_data[d], $sformatf("inst %0d frame %h expected %h", d, frame[d], exp_data[d]));
          check(fvalid[d] == exp_v[d], $sformatf("inst %0d frame valid", d));
        end
        check_next = 0;
      end
      if (stb) begin
        if (last_stb >= 0) check(cyc - last_stb == 9, "LHC strobe period not 9 clkp cycles");
        last_stb = cyc;
        for (int d = 0; d < 2; d++) begin
          if (pat) begin
            exp_data[d] = {60'hCAB_ABAB_ABAB_ABAB, cnt};
            exp_v[d] = 0;
          end else begin
            exp_data[d] = pend_v[d] ? pend[d] : '0;
            exp_v[d] = pend_v[d];
            if (pend_v[d]) n_frames++;
          end
          pend_v[d] = 0;
        end
        if (pat) n_pattern++;
        cnt++;
        check_next = 1;
      end
      // words completed in this cycle
      for (int d = 0; d < 2; d++) begin
        bit done;
        logic [GBT_FRAME_W-1:0] w;
        done = 0;
        if (d == 0 && ld[0].valid) begin done = 1; w = GBT_FRAME_W'(ld[0].data); end
        if (d == 1 && ld[1].valid) begin
          if (ld[1].start && !ld[1].last) begin low[1] = ld[1].data; low_v = 1; end
          else if (ld[1].last && low_v) begin done = 1; w = GBT_FRAME_W'({ld[1].data[3:0], low[1]}); low_v = 0; end
        end
        if (done) begin
          if (pend_v[d]) begin exp_drop[d] = 1; n_drops_model++; end
          else begin pend[d] = w; pend_v[d] = 1; end
        end
      end
    end
  end

  function automatic lword_t lw(bit s, bit l, logic [63:0] d);
    return '{valid: 1'b1, start: s, last: l, strobe: 1'b1, data: d};
  endfunction

  // Drivers: at most one word per strobe-to-strobe interval unless drops are
  // allowed; a 68-bit TP never starts in the cycle before a strobe, so both
  // of its parts fall in one interval.
  bit second [2] = '{0, 0};
  logic [3:0] hi [2];
  int sent_in_period [2] = '{0, 0};

  task automatic drive_cycle();
    for (int d = 0; d < 2; d++) begin
      ld[d] = LWORD_NULL;
      if (d == 1 && second[1]) begin
        ld[1] = lw(0, 1, {60'h0, hi[1]});
        second[1] = 0;
      end else if ((allow_drop || sent_in_period[d] == 0) && !(d == 1 && phase == 4'd7)
                   && ($urandom % 100) < 20) begin
        if (d == 0) ld[0] = lw(1, 1, {$urandom, $urandom});
        else begin ld[1] = lw(1, 0, {$urandom, $urandom}); hi[1] = 4'($urandom | 1); second[1] = 1; end
        sent_in_period[d]++;
      end
    end
  endtask

  initial begin
    ld[0] = LWORD_NULL; ld[1] = LWORD_NULL;
    repeat (3) @(posedge clk);
    rst <= 0;
    // one word per LHC period at a random phase
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (phase == 4'd8) begin sent_in_period[0] = 0; sent_in_period[1] = 0; end
      drive_cycle();
    end
    @(negedge clk); ld[0] = LWORD_NULL; ld[1] = LWORD_NULL;
    repeat (30) @(negedge clk);
    check(n_frames > 300, "too few data frames");
    check(!drop[0] && !drop[1], "word dropped at one word per LHC clock");
    // pattern mode
    pat = 1;
    repeat (300) @(negedge clk);
    pat = 0;
    repeat (30) @(negedge clk);
    check(n_pattern > 20, "pattern mode never active");
    // words faster than the link: the second one in a period is dropped
    allow_drop = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      drive_cycle();
    end
    @(negedge clk); ld[0] = LWORD_NULL; ld[1] = LWORD_NULL;
    repeat (30) @(negedge clk);
    check(n_drops_model > 0 && drop[0] && drop[1], "drop never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
