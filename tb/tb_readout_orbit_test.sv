// tb_readout_orbit_test: the laboratory readout test replayed on the
// readout system at its default parameters.
//
// In the test, the same hit data are played into the sector once per LHC
// orbit (3564 LHC clocks). Two of the thirteen hit lanes, elements 7 and 9
// of the input array, each carry four hits, one per LHC clock, in the
// output format of the trigger algorithm (valid, 6 zeros, channel, BX, TDC):
// channels 35, 34, 33, 32, BX 1024, TDC 1, i.e. 0x80468001, 0x80448001,
// 0x80428001, 0x80408001. The receiving board captures the GBT links over
// several orbits; it expects four hit words per orbit on each of the two hit
// links, each hit in the upper half of the 64-bit data (an odd lane is the
// high half of its word), and every orbit's words arriving at the same BXs.
//
// This bench checks exactly that over three orbits:
//  - GBT links 0 and 1 each carry four valid frames per orbit, equal to
//    {20'h0, hit, 32'h0} in the order sent, in four consecutive LHC clocks;
//  - the BXs of arrival are the same in every orbit, one or two LHC clocks
//    after the BX in which the hit entered;
//  - the TP and track links (2..5) carry nothing, and the overflow and drop
//    flags read over IPbus stay clear.
// The input BXs (1568..1571) are this bench's choice; the hit words,
// lanes, orbit length and expected pattern follow the laboratory test.
module tb_readout_orbit_test;
  import readout_pkg::*;
  import ipbus_pkg::*;

  localparam int ORBIT   = 3564;
  localparam int N_ORBIT = 3;
  localparam int IN_BX   = 1568;
  localparam logic [31:0] HIT_W4 [4] = '{32'h8046_8001, 32'h8044_8001,
                                          32'h8042_8001, 32'h8040_8001};

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
    #((N_ORBIT * ORBIT + 200) * 9 * 10 + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ipb_read(input logic [31:0] addr, output logic [31:0] rd);
    @(negedge ipb_clk);
    wb = '{addr: addr, wdata: '0, strobe: 1'b1, write: 1'b0};
    do @(negedge ipb_clk); while (!rb.ack && !rb.err);
    check(rb.ack, "IPbus read not acknowledged");
    rd = rb.rdata;
    wb = IPB_WBUS_NULL;
    @(negedge ipb_clk);
  endtask

  // LHC clock count: period p lasts from the cycle after the (p-1)th strobe
  // to the pth strobe; bx_cnt holds p during it.
  int bx_cnt = 0;
  bit stb_d = 0;
  always @(posedge clk) begin
    stb_d <= rst ? 1'b0 : stb;
    if (rst) bx_cnt <= 0;
    else if (stb) bx_cnt <= bx_cnt + 1;
  end

  // Driver: in the first clkp cycle of LHC clock IN_BX+j of every orbit,
  // lanes 7 and 9 carry hit j; all other lanes and cycles carry zero.
  always @(negedge clk) begin
    for (int i = 0; i < 13; i++) hits[i] = '0;
    if (!rst && stb_d && bx_cnt < N_ORBIT * ORBIT) begin
      int pos;
      pos = bx_cnt % ORBIT;
      if (pos >= IN_BX && pos < IN_BX + 4) begin
        hits[7] = HIT_W4[pos - IN_BX];
        hits[9] = HIT_W4[pos - IN_BX];
      end
    end
  end

  // Monitor: frames change at a strobe; sample each once, in the next cycle.
  int n_rx [2][N_ORBIT];
  int rx_pos [2][N_ORBIT][4];
  int n_other = 0;
  always @(posedge clk) if (!rst && stb_d) begin
    int orb, pos;
    orb = bx_cnt / ORBIT;
    pos = bx_cnt % ORBIT;
    for (int g = 0; g < 6; g++) if (gvalid[g]) begin
      if (g >= 2) n_other++;
      else if (orb < N_ORBIT) begin
        int k;
        k = n_rx[g][orb];
        if (k < 4) begin
          check(gbt[g] == {20'h0, HIT_W4[k], 32'h0},
                $sformatf("link %0d orbit %0d word %0d: %h", g, orb, k, gbt[g]));
          rx_pos[g][orb][k] = pos;
        end else check(0, $sformatf("link %0d orbit %0d: extra frame %h", g, orb, gbt[g]));
        n_rx[g][orb] = k + 1;
      end
    end
  end

  initial begin
    logic [31:0] rd;
    for (int i = 0; i < 13; i++) hits[i] = '0;
    for (int i = 0; i < 4; i++) begin tps[i] = '0; csp[i] = LWORD_NULL; end
    foreach (n_rx[g, o]) n_rx[g][o] = 0;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge ipb_clk);
    ipb_rst = 0;

    wait (bx_cnt == N_ORBIT * ORBIT + 10);

    for (int g = 0; g < 2; g++)
      for (int o = 0; o < N_ORBIT; o++) begin
        check(n_rx[g][o] == 4, $sformatf("link %0d orbit %0d: %0d words, 4 expected",
                                         g, o, n_rx[g][o]));
        for (int k = 0; k < 4; k++) begin
          check(rx_pos[g][o][k] == rx_pos[g][0][k],
                $sformatf("link %0d orbit %0d word %0d at BX %0d, orbit 0 had %0d",
                          g, o, k, rx_pos[g][o][k], rx_pos[g][0][k]));
          check(rx_pos[g][o][k] - (IN_BX + k) inside {[1:2]},
                $sformatf("link %0d orbit %0d word %0d: sent BX %0d, arrived BX %0d",
                          g, o, k, IN_BX + k, rx_pos[g][o][k]));
          if (k > 0)
            check(rx_pos[g][o][k] == rx_pos[g][o][k-1] + 1,
                  $sformatf("link %0d orbit %0d: words %0d and %0d not in consecutive BXs",
                            g, o, k - 1, k));
        end
      end
    for (int g = 0; g < 2; g++)
      $display("link %0d: hits arrive at BX %0d..%0d of every orbit", g,
               rx_pos[g][0][0], rx_pos[g][0][3]);
    check(n_other == 0, $sformatf("%0d frames on the TP and track links", n_other));

    ipb_read(32'h1, rd);
    check(rd == 32'h0, $sformatf("status register %h: overflow or drop flag set", rd));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
