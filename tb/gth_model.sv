// gth_model: behavioural model of one transceiver channel with a serial
// loop from its TX to its RX, for simulation only (not synthesizable). It
// has the ports the link logic uses of the real channel:
//  - PLL and reset: pll_lock_o rises LOCK_DELAY cycles after pll_reset_i
//    falls, unless lock_block_i holds it off; tx/rx_reset_done_o rise
//    DONE_DELAY cycles after the datapath reset falls with the PLL locked.
//  - TX synchronous gearbox: in every cycle whose txsequence_i is not 32
//    the 66-bit block {data, header} is appended to a bit stream, header
//    bit 0 first, then data bit 0 first. The stream stands for the line.
//  - RX synchronous gearbox: in 32 of every 33 cycles, if the stream holds
//    enough bits, the next 66 bits are cut as a block (header, then data)
//    with rxdatavalid/rxheadervalid high. A pulse on rxgearboxslip_i
//    discards one bit, moving the block boundary by one position. After each
//    RX reset the stream is cut at a random bit position, as a real receiver
//    would be after locking to the line.
//  - loopback_i is accepted and ignored: the model always closes the loop.
// The clocks are one: txusrclk2 and rxusrclk2 of a channel in loopback run
// at the same rate; the model uses one clk for both.
module gth_model #(
  parameter int unsigned LOCK_DELAY = 40,
  parameter int unsigned DONE_DELAY = 20
) (
  input  logic        clk,
  input  logic        pll_reset_i,
  input  logic        tx_reset_i,
  input  logic        rx_reset_i,
  input  logic        lock_block_i,
  output logic        pll_lock_o,
  output logic        tx_reset_done_o,
  output logic        rx_reset_done_o,
  input  logic [2:0]  loopback_i,
  input  logic [63:0] txdata_i,
  input  logic [1:0]  txheader_i,
  input  logic [6:0]  txsequence_i,
  output logic [63:0] rxdata_o,
  output logic [1:0]  rxheader_o,
  output logic        rxdatavalid_o,
  output logic        rxheadervalid_o,
  input  logic        rxgearboxslip_i,
  output int          slips_o
);

  bit  line [$];
  int  lock_cnt = 0, txd_cnt = 0, rxd_cnt = 0, rx_seq = 0;
  logic [2:0] unused_lb;

  initial begin
    pll_lock_o = 0; tx_reset_done_o = 0; rx_reset_done_o = 0;
    rxdata_o = '0; rxheader_o = '0; rxdatavalid_o = 0; rxheadervalid_o = 0;
    slips_o = 0;
  end

  assign unused_lb = loopback_i;

  always @(posedge clk) begin
    // PLL and reset-done flags
    if (pll_reset_i || lock_block_i) begin lock_cnt <= 0; pll_lock_o <= 0; end
    else if (lock_cnt < LOCK_DELAY) lock_cnt <= lock_cnt + 1;
    else pll_lock_o <= 1;
    if (tx_reset_i || !pll_lock_o) begin txd_cnt <= 0; tx_reset_done_o <= 0; end
    else if (txd_cnt < DONE_DELAY) txd_cnt <= txd_cnt + 1;
    else tx_reset_done_o <= 1;
    if (rx_reset_i || !pll_lock_o) begin rxd_cnt <= 0; rx_reset_done_o <= 0; end
    else if (rxd_cnt < DONE_DELAY) rxd_cnt <= rxd_cnt + 1;
    else rx_reset_done_o <= 1;

    // TX gearbox onto the line
    if (tx_reset_done_o && txsequence_i != 7'd32) begin
      for (int b = 0; b < 2; b++)  line.push_back(txheader_i[b]);
      for (int b = 0; b < 64; b++) line.push_back(txdata_i[b]);
    end

    // RX gearbox from the line
    if (rx_reset_i || !rx_reset_done_o) begin
      line.delete();
      rx_seq <= 0;
      rxdatavalid_o <= 0; rxheadervalid_o <= 0;
    end else begin
      if (rxgearboxslip_i && line.size() > 0) begin
        void'(line.pop_front());
        slips_o <= slips_o + 1;
      end
      rx_seq <= (rx_seq == 32) ? 0 : rx_seq + 1;
      if (rx_seq != 32 && line.size() >= 66 + 66) begin
        for (int b = 0; b < 2; b++)  rxheader_o[b] <= line.pop_front();
        for (int b = 0; b < 64; b++) rxdata_o[b]   <= line.pop_front();
        rxdatavalid_o <= 1; rxheadervalid_o <= 1;
      end else begin
        rxdatavalid_o <= 0; rxheadervalid_o <= 0;
      end
    end
  end

  // Cut the line at a random position when the RX side comes out of reset.
  always @(posedge rx_reset_done_o) begin
    int n;
    n = 1 + $urandom % 65;
    repeat (n) begin
      @(posedge clk);
      if (line.size() > 0) void'(line.pop_front());
    end
  end

endmodule
