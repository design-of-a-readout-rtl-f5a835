// tb_scrambler64: self-checking test of the 1 + x^39 + x^58 scrambler.
// Reference: a bit-serial model in the testbench, a 58-bit history seeded
// with ones like the design; each data bit (bit 0 first) is XORed with the
// scrambled bits sent 39 and 58 bits before it. Random words, with random
// idle cycles (en low) in which the output and state must hold. The output
// of a word appears one cycle after it is presented.
module tb_scrambler64;
  logic clk = 0, rst = 1, en = 0;
  logic [63:0] din = '0, dout;
  int checks = 0, failures = 0;

  scrambler64 dut (.clk, .rst, .en, .din, .dout);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist [$];   // scrambled bits sent so far, oldest first

  function automatic logic [63:0] model_word(logic [63:0] w);
    logic [63:0] o;
    for (int b = 0; b < 64; b++) begin
      int n;
      n = hist.size();
      o[b] = w[b] ^ hist[n - 39] ^ hist[n - 58];
      hist.push_back(o[b]);
      void'(hist.pop_front());
    end
    return o;
  endfunction

  initial begin
    logic [63:0] exp_w = '0;
    for (int i = 0; i < 58; i++) hist.push_back(1'b1);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      en = ($urandom % 5) != 0;
      din = (i < 20) ? 64'h0 : {$urandom, $urandom};
      if (en) exp_w = model_word(din);
      @(negedge clk);
      check(dout == exp_w, $sformatf("word %0d: %h expected %h", i, dout, exp_w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
