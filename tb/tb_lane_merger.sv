// tb_lane_merger: self-checking test of lane_merger.
// Two testbench queues act as first-word-fall-through FIFOs. Two mergers are
// tested at once: one issuing every cycle (MIN_GAP 1) and one paced at one
// word per 9 cycles. Checks: every word comes out once, each source in
// order; when both sources are non-empty the grants alternate; an idle lane
// shows zero; the paced merger leaves at least 9 cycles between words and
// never idles for longer than needed while a word waits; no word is taken
// while out_ready is low (driven randomly on the unpaced merger).
module tb_lane_merger;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

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

  always #5 clk = ~clk;

  // Source words carry their source in bit 63 and a sequence number below.
  logic [63:0] qa [2][$], qb [2][$];
  logic [63:0] na [2], nb [2];
  logic a_empty [2], b_empty [2], a_rd [2], b_rd [2], ov [2];
  logic [63:0] a_dout [2], b_dout [2], od [2];
  int alternations = 0, stalls = 0;
  logic ordy [2] = '{1'b1, 1'b1};

  for (genvar m = 0; m < 2; m++) begin : g_dut
    assign a_empty[m] = (qa[m].size() == 0);
    assign b_empty[m] = (qb[m].size() == 0);
    assign a_dout[m]  = a_empty[m] ? 64'hDEAD : qa[m][0];
    assign b_dout[m]  = b_empty[m] ? 64'hDEAD : qb[m][0];
    lane_merger #(.W(64), .MIN_GAP(m == 0 ? 1 : 9)) dut (
      .clk, .rst,
      .a_empty(a_empty[m]), .a_dout(a_dout[m]), .a_rd(a_rd[m]),
      .b_empty(b_empty[m]), .b_dout(b_dout[m]), .b_rd(b_rd[m]),
      .out_ready(ordy[m]), .out_valid(ov[m]), .out_data(od[m]));
  end

  logic [63:0] exp_a [2][$], exp_b [2][$];
  int last_grant [2] = '{-1, -1};
  int since [2] = '{100, 100};
  int pushed = 0, got = 0;

  always @(posedge clk) if (!rst) begin
    for (int m = 0; m < 2; m++) begin
      // output checks (registered word of the previous grant)
      if (ov[m]) begin
        got++;
        if (od[m][63]) begin
          check(exp_b[m].size() > 0 && od[m] == exp_b[m][0], "b word out of order");
          if (exp_b[m].size() > 0) void'(exp_b[m].pop_front());
        end else begin
          check(exp_a[m].size() > 0 && od[m] == exp_a[m][0], "a word out of order");
          if (exp_a[m].size() > 0) void'(exp_a[m].pop_front());
        end
      end else begin
        check(od[m] == '0, "idle lane not zero");
      end
      // grant checks
      if (a_rd[m] || b_rd[m]) begin
        if (m == 1) check(since[1] >= 9, "paced merger issued too early");
        check(ordy[m], "grant while out_ready low");
        if (!a_empty[m] && !b_empty[m] && last_grant[m] >= 0) begin
          check((a_rd[m] ? 0 : 1) != last_grant[m], "no alternation with both FIFOs busy");
          alternations++;
        end
        last_grant[m] = a_rd[m] ? 0 : 1;
        since[m] = 1;
      end else begin
        if (m == 0 && ordy[0]) check(a_empty[0] && b_empty[0], "unpaced merger idle while a word waits");
        if (!ordy[m] && !(a_empty[m] && b_empty[m])) stalls++;
        if (m == 1 && since[1] >= 9) check(a_empty[1] && b_empty[1], "paced merger idle too long");
        since[m]++;
      end
      if (a_rd[m]) begin exp_a[m].push_back(qa[m][0]); void'(qa[m].pop_front()); end
      if (b_rd[m]) begin exp_b[m].push_back(qb[m][0]); void'(qb[m].pop_front()); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ordy[0] = ($urandom % 100) < 80;
      for (int m = 0; m < 2; m++) begin
        int pa = (i < 1000) ? 40 : 5;   // burst phase, then a sparse phase
        if ($urandom % 100 < pa) begin qa[m].push_back({1'b0, 31'(m), 32'(i)}); pushed++; end
        if ($urandom % 100 < pa) begin qb[m].push_back({1'b1, 31'(m), 32'(i)}); pushed++; end
      end
    end
    @(negedge clk); ordy[0] = 1'b1;
    repeat (20000) @(posedge clk);
    check(stalls > 10, "back-pressure never exercised");
    check(got == pushed, $sformatf("words out %0d, in %0d", got, pushed));
    check(alternations > 50, "alternation never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
