// tb_ipbus_ctrlreg: self-checking test of the IPbus register bank, with
// three control and two status registers. A model of the control registers
// is the reference. Random transactions: writes and reads of control
// registers, reads of status registers (the testbench drives stat_i),
// writes to status registers and accesses past the bank, which must be
// answered with err. A fresh strobe must be answered one cycle later with a
// single ack or err; a strobe held on for the next transaction right after
// an answer must be answered one cycle after that, exactly once.
module tb_ipbus_ctrlreg;
  import ipbus_pkg::*;
  localparam int unsigned NC = 3, NS = 2;
  logic clk = 0, rst = 1;
  ipb_wbus_t wb = IPB_WBUS_NULL;
  ipb_rbus_t rb;
  logic [31:0] ctrl [NC];
  logic [31:0] stat [NS];
  logic [31:0] model [NC];
  int checks = 0, failures = 0;
  int n_err = 0, n_b2b = 0, n_wr = 0, n_rd = 0;

  ipbus_ctrlreg #(.N_CTRL(NC), .N_STAT(NS)) dut (.clk, .rst, .ipb_i(wb), .ipb_o(rb),
                                                 .ctrl_o(ctrl), .stat_i(stat));

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

  initial begin
    for (int i = 0; i < NC; i++) model[i] = '0;
    for (int i = 0; i < NS; i++) stat[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < NC; i++) check(ctrl[i] == '0, "control register not reset to zero");
    for (int n = 0; n < 3000; n++) begin
      int a, waited;
      bit wr, b2b;
      b2b = wb.strobe;                 // strobe still high from the last answer
      a = $urandom % (NC + NS + 2);
      wr = ($urandom % 2) == 1;
      wb.addr = 32'(a);
      wb.write = wr;
      wb.wdata = $urandom;
      wb.strobe = 1'b1;
      for (int i = 0; i < NS; i++) stat[i] = $urandom;
      waited = 0;
      do begin @(negedge clk); waited++; end while (!rb.ack && !rb.err && waited < 10);
      check(waited == (b2b ? 2 : 1), $sformatf("answer after %0d cycles", waited));
      check(!(rb.ack && rb.err), "ack and err together");
      if (a < NC) begin
        check(rb.ack, "control access not acknowledged");
        if (wr) begin model[a] = wb.wdata; n_wr++; end
        else begin check(rb.rdata == model[a], $sformatf("ctrl %0d read %h expected %h", a, rb.rdata, model[a])); n_rd++; end
      end else if (a < NC + NS && !wr) begin
        check(rb.ack, "status read not acknowledged");
        check(rb.rdata == stat[a - NC], "status read data");
        n_rd++;
      end else begin
        check(rb.err, "bad access not answered with err");
        n_err++;
      end
      if (b2b) n_b2b++;
      // either release the strobe for a while or start the next one at once
      if (($urandom % 3) != 0) begin
        wb.strobe = 1'b0;
        repeat (1 + $urandom % 3) @(negedge clk);
        check(!rb.ack && !rb.err, "answer without a strobe");
      end
      for (int i = 0; i < NC; i++) check(ctrl[i] == model[i], "ctrl_o differs from the model");
    end
    check(n_err > 100 && n_b2b > 100 && n_wr > 100 && n_rd > 100, "not every kind of access exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
