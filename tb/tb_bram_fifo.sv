// tb_bram_fifo: self-checking test of bram_fifo.
// A queue in the testbench is the reference: every word written while the
// FIFO is not full must come out, in order, on dout whenever empty is low.
// Random write/read traffic fills the FIFO to full (checking that full, and
// overflow on a write while full, appear) and drains it. almost_full must
// accompany full and stay low while two or more words still fit. It also
// checks the two-cycle latency from a write into an empty FIFO to empty
// going low.
// A small DEPTH keeps the run short.
module tb_bram_fifo;
  localparam int unsigned W = 64, D = 16;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, almost_full, overflow;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int saw_full = 0, cyc = 0;

  bram_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: check head and follow pops and pushes at every edge.
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (!empty) begin
      check(model.size() > 0, "dout shown but reference empty");
      if (model.size() > 0) check(dout == model[0], $sformatf("head %h expected %h", dout, model[0]));
    end
    if (rd_en && !empty && model.size() > 0) void'(model.pop_front());
    if (wr_en && !full) model.push_back(din);
    if (full) saw_full++;
    if (full) check(almost_full, "full without almost_full");
    if (model.size() < D - 1) check(!almost_full, "almost_full with room for two more words");
    check(model.size() <= D + 1, "more words held than the FIFO can hold");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // latency: a write into an empty FIFO shows two cycles later
    wr_en <= 1; din <= 64'hA5A5_0000_0000_0001;
    @(posedge clk); wr_en <= 0;
    @(posedge clk); check(empty == 1'b1, "data visible after one cycle");
    @(posedge clk); check(empty == 1'b0, "data not visible after two cycles");
    check(dout == 64'hA5A5_0000_0000_0001, "first word");
    // fill to full with no reads
    for (int i = 0; i < D + 4; i++) begin
      wr_en <= 1; din <= {$urandom, $urandom};
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
    check(full == 1'b1, "full not set");
    check(overflow == 1'b1, "overflow not set after writing into a full FIFO");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      wr_en <= ($urandom % 100) < 50;
      rd_en <= ($urandom % 100) < 55;
      din   <= {$urandom, $urandom};
      @(posedge clk);
    end
    // drain
    wr_en <= 0; rd_en <= 1;
    repeat (D + 10) @(posedge clk);
    check(empty == 1'b1 && model.size() == 0, "FIFO did not drain completely");
    check(saw_full > 0, "full never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
