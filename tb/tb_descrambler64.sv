// tb_descrambler64: self-checking test of the 1 + x^39 + x^58 descrambler.
// The testbench scrambles random words with its own bit-serial model,
// started from a random state the descrambler does not know. Checks: from
// the second word on, the descrambler returns the original data one cycle
// after each scrambled word; words in idle cycles (en low) are ignored; after
// a single corrupted word (as after a gearbox slip) at most the two words
// touched by it come out wrong and the next ones are right again.
module tb_descrambler64;
  logic clk = 0, rst = 1, en = 0;
  logic [63:0] din = '0, dout;
  int checks = 0, failures = 0;
  int recovered = 0;

  descrambler64 dut (.clk, .rst, .en, .din, .dout);

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

  bit hist [$];

  function automatic logic [63:0] scramble(logic [63:0] w);
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
    logic [63:0] plain;
    int good_from = 1, n_words = 0;
    for (int i = 0; i < 58; i++) hist.push_back(1'($urandom));
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      en = ($urandom % 5) != 0;
      if (en) begin
        plain = {$urandom, $urandom};
        din = scramble(plain);
        if (i % 500 == 250) begin
          din = din ^ (64'h1 << ($urandom % 64));   // one bit error on the line
          good_from = n_words + 2;
        end
        n_words++;
      end else din = {$urandom, $urandom};
      @(negedge clk);
      if (en && n_words > good_from) begin
        check(dout == plain, $sformatf("word %0d: %h expected %h", n_words, dout, plain));
        if (good_from > 1 && n_words == good_from + 1) recovered++;
      end
    end
    check(recovered >= 9, "recovery after line errors not seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
