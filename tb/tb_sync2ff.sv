// tb_sync2ff: self-checking test of the two-flop synchroniser. A random
// level sequence is applied on d; q must repeat it exactly two clock edges
// later, and start at the power-up value of both instances (0 and 1).
module tb_sync2ff;
  logic clk = 0, d = 0;
  logic q0, q1;
  logic hist [$];
  int checks = 0, failures = 0;

  sync2ff #(.RESET_VAL(1'b0)) dut0 (.clk, .d, .q(q0));
  sync2ff #(.RESET_VAL(1'b1)) dut1 (.clk, .d, .q(q1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    check(q0 == 1'b0 && q1 == 1'b1, "power-up values");
    @(negedge clk);
    check(q1 == 1'b1, "power-up value lost after one edge");
    @(negedge clk);
    d = 1'b1;
    @(negedge clk);
    check(q0 == 1'b0, "q changed after one edge");
    @(negedge clk);
    check(q0 == 1'b1 && q1 == 1'b1, "q not following after two edges");
    for (int i = 0; i < 2000; i++) begin
      hist.push_back(d);
      if (hist.size() > 2) void'(hist.pop_front());
      @(negedge clk);
      if (hist.size() == 2) begin
        check(q0 == hist[0], "q0 is not d delayed by two edges");
        check(q1 == hist[0], "q1 is not d delayed by two edges");
      end
      d = ($urandom % 2) == 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
