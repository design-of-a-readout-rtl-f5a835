// tb_link_tx: self-checking test of the link transmitter.
// A source in the testbench offers messages of random length with random
// gaps and holds a word until user_ready is high. The reference model, built
// from the protocol rules, lists per gearbox-advancing cycle the block that
// must follow: the user word (header 01), or the CRC word {32'h0, CRC-32}
// (header 10) in the first free slot after a message (bit 31 inverted while
// error injection is on), or the sync word 0x5555555555555555 (header 10).
// It scrambles the payloads with its own bit-serial 1 + x^39 + x^58 model
// (seeded with ones) and computes the CRC bit-serially. Checks: txdata and
// txheader match the model two advancing cycles after a word is accepted;
// txsequence runs 0..32 and repeats, with stopdata and user_ready low
// exactly at 32, when txdata must hold; reset holds the sequence at zero.
module tb_link_tx;
  logic clk = 0, rst_req = 1;
  logic [63:0] udata = '0;
  logic uvalid = 0, inject = 0;
  logic uready, stop;
  logic [63:0] txdata;
  logic [1:0] txhdr;
  logic [6:0] txseq;
  int checks = 0, failures = 0;
  int n_msgs = 0, n_crc = 0, n_bad_crc = 0, n_sync = 0, n_pause = 0;

  link_tx dut (.clk, .rst_req_i(rst_req), .user_data_i(udata), .user_valid_i(uvalid),
               .user_ready_o(uready), .crc_err_inject_i(inject), .txdata_o(txdata),
               .txheader_o(txhdr), .txsequence_o(txseq), .stopdata_o(stop));

  always #5 clk = ~clk;

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

  // reference model
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

  function automatic logic [31:0] crc_add(logic [31:0] c, logic [63:0] w);
    for (int b = 0; b < 64; b++) begin
      logic fb;
      fb = c[31] ^ w[b];
      c = c << 1;
      if (fb) c = c ^ 32'h04C11DB7;
    end
    return c;
  endfunction

  logic [63:0] m_word, exp_data, prev_data;
  logic [1:0]  m_hdr, exp_hdr;
  logic [31:0] m_crc;
  bit m_pending, active = 0;
  int exp_seq = 0;

  always @(posedge clk) begin
    if (active) begin
      // sequence counter
      check(txseq == 7'(exp_seq), $sformatf("txsequence %0d expected %0d", txseq, exp_seq));
      check(stop == (exp_seq == 32) && uready == (exp_seq != 32), "stopdata/user_ready at the pause");
      if (stop) n_pause++;
      if (exp_seq != 32) begin
        // advancing cycle: output after this edge is the scrambled previous word
        exp_data = scramble(m_word);
        exp_hdr  = m_hdr;
        if (uvalid) begin
          m_word = udata; m_hdr = 2'b01; m_pending = 1;
          m_crc = crc_add(m_crc, udata);
        end else begin
          if (m_pending) begin
            m_word = {32'h0, m_crc[31] ^ inject, m_crc[30:0]}; m_hdr = 2'b10; m_pending = 0;
            n_crc++; if (inject) n_bad_crc++;
          end else begin
            m_word = 64'h5555_5555_5555_5555; m_hdr = 2'b10; n_sync++;
          end
          m_crc = 32'hFFFFFFFF;
        end
      end
      exp_seq = (exp_seq == 32) ? 0 : exp_seq + 1;
    end
  end

  always @(negedge clk) if (active) begin
    check(txdata == exp_data, $sformatf("txdata %h expected %h", txdata, exp_data));
    check(txhdr == exp_hdr, $sformatf("txheader %b expected %b", txhdr, exp_hdr));
  end

  initial begin
    for (int i = 0; i < 58; i++) hist.push_back(1'b1);
    m_word = 64'h5555_5555_5555_5555; m_hdr = 2'b10;
    m_crc = 32'hFFFFFFFF; m_pending = 0;
    exp_data = '0; exp_hdr = 2'b10;
    repeat (5) @(negedge clk);
    check(txseq == 0 && uready == 0, "sequence not held in reset");
    rst_req = 0;
    // the request passes a two-flop synchroniser: the sequence starts 2 edges later
    @(negedge clk); @(negedge clk);
    check(txseq == 0, "sequence left reset too early");
    active = 1;
    for (int m = 0; m < 150; m++) begin
      int len, gap;
      len = 1 + $urandom % 40;
      gap = $urandom % 5;
      inject = (m % 7) == 3;
      for (int i = 0; i < len; i++) begin
        udata = {$urandom, $urandom};
        uvalid = 1;
        // hold the word until user_ready is high; it is then taken at the next edge
        while (!uready) @(negedge clk);
        @(negedge clk);
      end
      uvalid = 0;
      repeat (gap + 1) @(negedge clk);
      n_msgs++;
    end
    active = 0;
    check(n_crc > 100 && n_bad_crc > 10 && n_sync > 100 && n_pause > 50, "not every word type seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
