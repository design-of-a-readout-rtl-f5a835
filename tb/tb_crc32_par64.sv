// tb_crc32_par64: self-checking test of the 64-bit parallel CRC-32.
// Reference 1: the checksums 0x6904BB59, 0x2C2D77FB and 0xCCC5CE0D after the
// words 0, 1 and 2 of a counter message, and the checksums at the end of a
// captured 30-word counter message (words 0..30 without word 9) ending in
// 0x7EA9C3A5: known values of the link's CRC convention. Reference 2: a bit-serial model in the testbench (one shift of
// a 32-bit register per message bit, bit 0 of each word first) for random
// messages of random length, with idle cycles (en low) between words, which
// must leave the checksum unchanged. It also checks that init reloads
// 0xFFFFFFFF and that a word is included one cycle after it is presented.
module tb_crc32_par64;
  logic clk = 0, init = 0, en = 0;
  logic [63:0] data = '0;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  crc32_par64 dut (.clk, .init, .en, .data, .crc_o(crc));

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

  function automatic logic [31:0] serial_crc(logic [31:0] c, logic [63:0] w);
    for (int b = 0; b < 64; b++) begin
      logic fb;
      fb = c[31] ^ w[b];
      c = c << 1;
      if (fb) c = c ^ 32'h04C11DB7;
    end
    return c;
  endfunction

  initial begin
    logic [31:0] model;
    logic [31:0] known [3] = '{32'h6904BB59, 32'h2C2D77FB, 32'hCCC5CE0D};
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    check(crc == 32'hFFFFFFFF, "init value");
    for (int i = 0; i < 3; i++) begin
      en = 1; data = 64'(i);
      @(negedge clk);
      check(crc == known[i], $sformatf("after word %0d: %h expected %h", i, crc, known[i]));
    end
    // A captured link message: the counter words 0..30 with word 9 absent
    // (it was offered during a gearbox pause and not sent). Its checksum
    // after words 0x1a..0x1e was 6FC69E6E, 75F42C1F, 11639152, 3BA88AC7 and
    // 7EA9C3A5, the last being the CRC word sent after the message.
    begin
      logic [31:0] tail [5] = '{32'h6FC69E6E, 32'h75F42C1F, 32'h11639152,
                                32'h3BA88AC7, 32'h7EA9C3A5};
      en = 0; init = 1; @(negedge clk); init = 0;
      for (int i = 0; i < 31; i++) if (i != 9) begin
        en = 1; data = 64'(i);
        @(negedge clk);
        if (i >= 26)
          check(crc == tail[i-26], $sformatf("captured message after word %0d: %h expected %h",
                                             i, crc, tail[i-26]));
      end
    end
    en = 0;
    for (int m = 0; m < 400; m++) begin
      int len;
      init = 1; @(negedge clk); init = 0;
      model = 32'hFFFFFFFF;
      len = 1 + $urandom % 40;
      for (int i = 0; i < len; i++) begin
        if (($urandom % 4) == 0) begin
          en = 0; data = {$urandom, $urandom};
          @(negedge clk);
          check(crc == model, "checksum changed while en was low");
        end
        en = 1; data = {$urandom, $urandom};
        model = serial_crc(model, data);
        @(negedge clk);
        check(crc == model, $sformatf("message %0d word %0d: %h expected %h", m, i, crc, model));
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
