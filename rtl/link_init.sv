// link_init: reset sequencing and initialization monitor of the link,
// running on the free-running clock (the transceiver's user clocks are not
// available while it is in reset).
//
// Reset order: first the PLL that drives TX and RX, then, once it has
// locked, the TX and RX datapaths. The states:
//   PLL_RESET  pll_reset_o and the datapath resets high for RESET_HOLD cycles
//   WAIT_LOCK  wait for pll_lock_i; after PLL_LOCK_TIMEOUT cycles: retry
//   DP_RESET   datapath reset(s) high for RESET_HOLD cycles
//   WAIT_DONE  wait for tx_reset_done_i and rx_reset_done_i; after
//              RESET_DONE_TIMEOUT cycles: retry the datapath reset
//   MONITOR    init_done_o high; if rx_data_good_i (the receiver's sync_ok)
//              stays low for DATA_GOOD_TIMEOUT cycles the link is taken as
//              lost and only the RX datapath is reset
// Every retry increments retry_count_o (saturating), a debug counter.
// Three reset groups can be requested at any time, as levels: reset_all_i
// (everything), reset_tx_i (PLL and TX datapath) and reset_rx_i (RX
// datapath only). All inputs are synchronised to clk here.
//
// The reset order, the groups, the retries and the link-loss monitor follow
// the protocol description; the state encoding and every hold and timeout
// length are this design's choices.
module link_init #(
  parameter int unsigned RESET_HOLD         = 16,
  parameter int unsigned PLL_LOCK_TIMEOUT   = 4096,
  parameter int unsigned RESET_DONE_TIMEOUT = 4096,
  parameter int unsigned DATA_GOOD_TIMEOUT  = 65536
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       reset_all_i,
  input  logic       reset_tx_i,
  input  logic       reset_rx_i,
  input  logic       pll_lock_i,
  input  logic       tx_reset_done_i,
  input  logic       rx_reset_done_i,
  input  logic       rx_data_good_i,
  output logic       pll_reset_o,
  output logic       tx_datapath_reset_o,
  output logic       rx_datapath_reset_o,
  output logic       init_done_o,
  output logic [7:0] retry_count_o
);

  typedef enum logic [2:0] {
    ST_PLL_RESET, ST_WAIT_LOCK, ST_DP_RESET, ST_WAIT_DONE, ST_MONITOR
  } state_t;

  localparam int unsigned TMAX = (PLL_LOCK_TIMEOUT > DATA_GOOD_TIMEOUT) ?
                                 ((PLL_LOCK_TIMEOUT > RESET_DONE_TIMEOUT) ? PLL_LOCK_TIMEOUT : RESET_DONE_TIMEOUT) :
                                 ((DATA_GOOD_TIMEOUT > RESET_DONE_TIMEOUT) ? DATA_GOOD_TIMEOUT : RESET_DONE_TIMEOUT);
  localparam int unsigned TW = $clog2(TMAX + RESET_HOLD + 1);

  state_t        state;
  logic [TW-1:0] timer;
  logic          do_tx, do_rx;     // which datapaths the current sequence resets
  logic          all_s, tx_s, rx_s, lock_s, txd_s, rxd_s, good_s;

  sync2ff u_s0 (.clk, .d(reset_all_i),     .q(all_s));
  sync2ff u_s1 (.clk, .d(reset_tx_i),      .q(tx_s));
  sync2ff u_s2 (.clk, .d(reset_rx_i),      .q(rx_s));
  sync2ff u_s3 (.clk, .d(pll_lock_i),      .q(lock_s));
  sync2ff u_s4 (.clk, .d(tx_reset_done_i), .q(txd_s));
  sync2ff u_s5 (.clk, .d(rx_reset_done_i), .q(rxd_s));
  sync2ff u_s6 (.clk, .d(rx_data_good_i),  .q(good_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= ST_PLL_RESET;
      timer         <= '0;
      do_tx         <= 1'b1;
      do_rx         <= 1'b1;
      retry_count_o <= '0;
    end else if (all_s || tx_s) begin
      state <= ST_PLL_RESET;
      timer <= '0;
      do_tx <= 1'b1;
      do_rx <= all_s;
    end else if (rx_s) begin
      state <= ST_DP_RESET;
      timer <= '0;
      do_tx <= 1'b0;
      do_rx <= 1'b1;
    end else begin
      timer <= timer + 1'b1;
      unique case (state)
        ST_PLL_RESET:
          if (timer == TW'(RESET_HOLD - 1)) begin
            state <= ST_WAIT_LOCK;
            timer <= '0;
          end
        ST_WAIT_LOCK:
          if (lock_s) begin
            state <= ST_DP_RESET;
            timer <= '0;
          end else if (timer == TW'(PLL_LOCK_TIMEOUT - 1)) begin
            state <= ST_PLL_RESET;
            timer <= '0;
            if (retry_count_o != '1) retry_count_o <= retry_count_o + 1'b1;
          end
        ST_DP_RESET:
          if (timer == TW'(RESET_HOLD - 1)) begin
            state <= ST_WAIT_DONE;
            timer <= '0;
          end
        ST_WAIT_DONE:
          if (txd_s && rxd_s) begin
            state <= ST_MONITOR;
            timer <= '0;
          end else if (timer == TW'(RESET_DONE_TIMEOUT - 1)) begin
            state <= ST_DP_RESET;
            timer <= '0;
            if (retry_count_o != '1) retry_count_o <= retry_count_o + 1'b1;
          end
        ST_MONITOR:
          if (good_s) begin
            timer <= '0;
          end else if (timer == TW'(DATA_GOOD_TIMEOUT - 1)) begin
            state <= ST_DP_RESET;
            timer <= '0;
            do_tx <= 1'b0;
            do_rx <= 1'b1;
            if (retry_count_o != '1) retry_count_o <= retry_count_o + 1'b1;
          end
        default: state <= ST_PLL_RESET;
      endcase
    end
  end

  assign pll_reset_o         = (state == ST_PLL_RESET);
  assign tx_datapath_reset_o = do_tx && (state == ST_PLL_RESET || state == ST_WAIT_LOCK || state == ST_DP_RESET);
  assign rx_datapath_reset_o = do_rx && (state == ST_PLL_RESET || state == ST_WAIT_LOCK || state == ST_DP_RESET);
  assign init_done_o         = (state == ST_MONITOR);

endmodule
