// tb_readout: self-checking test of the readout module (hit, TP and track
// modules side by side) at its default sizes. Tagged hits, TPs and tracks
// are sent at a low rate; the words expected on each pair of lanes are
// counted in a table keyed by the word, built from the inputs independently
// of the design (hit pairs packed as inputs 2k and 2k+1). Checks: every word
// leaves on the pair of lanes of its kind (0-1 hits, 2-3 TPs, 4-5 tracks),
// nothing is lost or invented, and the overflow flags map to bits 10:0
// (hits), 14:11 (TPs) and 15 (track), shown by flooding one kind at a time.
module tb_readout;
  import readout_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] hits [13];
  logic [63:0] tps [4];
  lword_t csp [4];
  lword_t lanes [6];
  logic [15:0] ovf;
  int checks = 0, failures = 0;
  int expc [3][logic [63:0]];
  int n_in [3] = '{0, 0, 0}, n_out [3] = '{0, 0, 0};

  readout dut (.clk, .rst, .hits_i(hits), .tps_i(tps), .csp_ldata_i(csp),
               .gbt_ldata_o(lanes), .overflow_o(ovf));

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

  task automatic expect_word(int kind, logic [63:0] w);
    if (expc[kind].exists(w)) expc[kind][w]++; else expc[kind][w] = 1;
    n_in[kind]++;
  endtask

  bit counting = 1;
  always @(posedge clk) if (!rst && counting) begin
    for (int k = 0; k < 7; k++) begin
      logic [63:0] w;
      w = {(2*k+1 < 13) ? hits[2*k+1] : 32'h0, hits[2*k]};
      if (w != '0) expect_word(0, w);
    end
    for (int k = 0; k < 4; k++) if (tps[k] != '0) expect_word(1, tps[k]);
    if (csp[0].valid && csp[0].data != '0) expect_word(2, csp[0].data);
    for (int l = 0; l < 6; l++) if (lanes[l].valid) begin
      int kind;
      kind = l / 2;
      check(expc[kind].exists(lanes[l].data) && expc[kind][lanes[l].data] > 0,
            $sformatf("lane %0d: word %h not expected there", l, lanes[l].data));
      if (expc[kind].exists(lanes[l].data)) begin
        expc[kind][lanes[l].data]--;
        if (expc[kind][lanes[l].data] == 0) expc[kind].delete(lanes[l].data);
      end
      n_out[kind]++;
    end
  end

  task automatic idle_inputs();
    for (int j = 0; j < 13; j++) hits[j] = '0;
    for (int k = 0; k < 4; k++) tps[k] = '0;
    for (int l = 0; l < 4; l++) csp[l] = LWORD_NULL;
  endtask

  initial begin
    idle_inputs();
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int j = 0; j < 13; j++) hits[j] = ($urandom % 100 < 2) ? {4'h8, 4'(j), 24'(i)} : '0;
      for (int k = 0; k < 4; k++) tps[k] = ($urandom % 100 < 4) ? {4'hB, 4'(k), 24'(i), 32'($urandom)} : '0;
      csp[0] = ($urandom % 100 < 15) ? '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1,
                                         data: {32'hC0DE_0000, 32'(i)}} : LWORD_NULL;
      csp[1] = '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1, data: {$urandom, $urandom}};
    end
    @(negedge clk); idle_inputs();
    repeat (5000) @(negedge clk);
    for (int k = 0; k < 3; k++)
      check(n_out[k] == n_in[k] && n_in[k] > 100, $sformatf("kind %0d: out %0d in %0d", k, n_out[k], n_in[k]));
    check(ovf == '0, "overflow at low rate");
    counting = 0;
    // flood the tracks only
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      csp[0] = '{valid: 1'b1, start: 1'b1, last: 1'b1, strobe: 1'b1, data: {32'hC0DE_1111, 32'(i)}};
    end
    @(negedge clk); idle_inputs();
    check(ovf == 16'h8000, $sformatf("track flood: overflow %h", ovf));
    // then the TPs
    for (int i = 0; i < 1200; i++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) tps[k] = {4'hB, 4'(k), 24'(i), 32'h1};
    end
    @(negedge clk); idle_inputs();
    check(ovf == 16'hF800, $sformatf("TP flood: overflow %h", ovf));
    // then the hits
    for (int i = 0; i < 2500; i++) begin
      @(negedge clk);
      for (int j = 0; j < 13; j++) hits[j] = {4'h8, 4'(j), 24'(i)};
    end
    @(negedge clk); idle_inputs();
    check(ovf[6:0] == 7'h7F && ovf[15:11] == 5'h1F, $sformatf("hit flood: overflow %h", ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
