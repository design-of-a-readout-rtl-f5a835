// tb_readout_system: self-checking test of the readout chain from the
// sector's inputs to the six GBT frames, with the IPbus register bank on its
// own slower clock. Checks: control and status registers read back as zero
// after reset; sparse tagged hits, TPs and tracks arrive in GBT frames of
// the right links (0-1 hits, 2-3 TPs, 4-5 tracks), 64 data bits
// zero-extended to 84, valid set, each exactly once; setting pattern-select
// bits over IPbus puts the test word (0xCABABABABABABAB above a counter
// that steps by one per frame) on exactly the selected links; a track flood
// sets status bit 15 (track FIFO overflow) and no other bit.
module tb_readout_system;
  import readout_pkg::*;
  import ipbus_pkg::*;
  logic clk = 0, rst = 1, ipb_clk = 0, ipb_rst = 1;
  logic [31:0] hits [13];
  logic [63:0] tps [4];
  lword_t csp [4];
  ipb_wbus_t wb = IPB_WBUS_NULL;
  ipb_rbus_t rb;
  logic [83:0] gbt [6];
  logic [5:0] gvalid;
  logic stb;
  int checks = 0, failures = 0;
  int expc [3][logic [63:0]];
  int n_in [3] = '{0, 0, 0}, n_out [3] = '{0, 0, 0};
  int n_pattern [6] = '{0, 0, 0, 0, 0, 0};
  logic [5:0] sel_model = '0;
  bit counting = 1;

  readout_system dut (.clk, .rst, .hits_i(hits), .tps_i(tps), .csp_ldata_i(csp),
                      .ipb_clk, .ipb_rst, .ipb_i(wb), .ipb_o(rb),
                      .gbt_data_o(gbt), .gbt_valid_o(gvalid), .lhc_stb_o(stb));

  always #5 clk = ~clk;
  always #16 ipb_clk = ~ipb_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #4000000;
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

  task automatic expect_word(int kind, logic [63:0] w);
    if (expc[kind].exists(w)) expc[kind][w]++; else expc[kind][w] = 1;
    n_in[kind]++;
  endtask

  // Inputs enter the reference table; frames are checked one cycle after a strobe.
  bit stb_d = 0;
  logic [23:0] last_cnt [6];
  always @(posedge clk) if (!rst) begin
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
        if (counting) begin
          if (n_pattern[g] > 0) check(gbt[g][23:0] == last_cnt[g] + 24'd1, "pattern counter step");
          last_cnt[g] = gbt[g][23:0];
          n_pattern[g]++;
        end
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

  task automatic traffic(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      for (int j = 0; j < 13; j++) hits[j] = ($urandom % 1000 < 15) ? {4'h8, 4'(j), 24'($urandom)} : '0;
      for (int k = 0; k < 4; k++) tps[k] = ($urandom % 100 < 3) ? {4'hB, 4'(k), 24'($urandom), 32'($urandom)} : '0;
      csp[0] = ($urandom % 100 < 12) ? '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1,
                                         data: {32'hC0DE_0000, 32'($urandom)}} : LWORD_NULL;
    end
    @(negedge clk); idle_inputs();
  endtask

  initial begin
    logic [31:0] rd;
    idle_inputs();
    repeat (4) @(posedge ipb_clk);
    rst <= 0; ipb_rst <= 0;
    ipb(32'h0, 0, '0, rd); check(rd == '0, "control not zero after reset");
    ipb(32'h1, 0, '0, rd); check(rd == '0, "status not zero after reset");
    traffic(4000);
    repeat (5000) @(negedge clk);
    for (int k = 0; k < 3; k++)
      check(n_out[k] == n_in[k] && n_in[k] > 50, $sformatf("kind %0d: frames %0d, words %0d", k, n_out[k], n_in[k]));
    // pattern on links 0, 2 and 5; the switch takes a few clocks to cross
    counting = 0;
    ipb(32'h0, 1, 32'h25, rd);
    repeat (20) @(negedge clk);
    sel_model = 6'h25;
    counting = 1;
    repeat (500) @(negedge clk);
    check(n_pattern[0] > 40 && n_pattern[2] > 40 && n_pattern[5] > 40, "pattern frames missing");
    check(n_pattern[1] == 0 && n_pattern[3] == 0 && n_pattern[4] == 0, "pattern on unselected link");
    counting = 0;
    ipb(32'h0, 1, 32'h0, rd);
    repeat (20) @(negedge clk);
    sel_model = '0;
    // track flood: only the track FIFO overflows
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      csp[0] = '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1, data: {32'hC0DE_2222, 32'(i)}};
    end
    @(negedge clk); idle_inputs();
    repeat (10) @(negedge ipb_clk);
    ipb(32'h1, 0, '0, rd);
    check(rd == 32'h0000_8000, $sformatf("status after track flood %h", rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
