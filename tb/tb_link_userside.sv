// tb_link_userside: self-checking test of the link test source at its
// default sizes (31 data words in a period of 64). With the transmitter's
// ready driven at random, the testbench counts accepted slots itself and
// checks: in slot s of a period valid is high exactly for s < 31 and the
// word is s; the counter advances only when ready is high; with enable low
// nothing is offered and the next message starts again at word 0.
module tb_link_userside;
  logic clk = 0, rst = 1, en = 0, ready = 0;
  logic [63:0] data;
  logic valid;
  int checks = 0, failures = 0;
  int slot = 0, n_msgs = 0;

  link_userside dut (.clk, .rst, .enable_i(en), .ready_i(ready), .data_o(data), .valid_o(valid));

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

  always @(posedge clk) if (!rst) begin
    if (!en) begin
      check(!valid, "word offered while disabled");
      slot = 0;
    end else begin
      check(valid == (slot < 31), $sformatf("slot %0d: valid %0d", slot, valid));
      if (slot < 31) check(data == 64'(slot), $sformatf("slot %0d: word %0d", slot, data));
      if (ready) begin
        if (slot == 30) n_msgs++;
        slot = (slot == 63) ? 0 : slot + 1;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      ready = ($urandom % 100) < 85;
      if (i % 5000 == 100) en = 0;
      if (i % 5000 == 140) en = 1;
      if (i == 3) en = 1;
      @(negedge clk);
    end
    check(n_msgs > 200, "too few messages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
