// gbt_tx_sorter: hands one readout lane from the clkp domain to a GBT link.
//
// The GBT link sends one 84-bit frame per LHC clock, while the readout runs
// on clkp, nine times faster and from the same source, so the crossing is a
// synchronous one: lhc_stb_i marks the clkp cycle that ends an LHC period.
// A word arriving on ldata_i is kept in a holding register and is put on
// gbt_data_o at the next lhc_stb_i, zero-extended to 84 bits (the 64 data
// bits in the LSBs, the 20 MSBs zero; a hit word in the low or high half of
// the 64 bits keeps its place). The frame then stays for one LHC period.
// Without a word the frame is all zero and gbt_valid_o is low.
//
// PAYLOAD_W > 64 is for TPs wider than an lword: the first lword (start set)
// carries bits 63:0, the second (last set) the remaining bits; the sorter
// joins the two parts and sends the whole TP in one frame.
//
// pattern_sel_i (from an IPbus control register) replaces the data by the
// link test word: 60 fixed bits 0xCABABABABABABAB above a 24-bit counter
// that increments every LHC clock.
//
// A second word arriving while one is still held is dropped and sets the
// sticky drop_o flag; the readout paces its lanes so that this does not
// happen. Latency: from the word's clkp cycle to the next lhc_stb_i edge,
// 1 to 9 clkp cycles. The holding behaviour, zero fill, part joining and
// test pattern follow the readout description; the drop policy is this
// design's.
module gbt_tx_sorter
  import readout_pkg::*;
#(
  parameter int unsigned PAYLOAD_W = LWORD_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   lhc_stb_i,
  input  lword_t                 ldata_i,
  input  logic                   pattern_sel_i,
  output logic [GBT_FRAME_W-1:0] gbt_data_o,
  output logic                   gbt_valid_o,
  output logic                   drop_o
);

  logic [PAYLOAD_W-1:0]     hold_q, new_word;
  logic                     hold_v, new_v;
  logic [PATTERN_CNT_W-1:0] pat_cnt;

  if (PAYLOAD_W <= LWORD_W) begin : g_one_part
    assign new_v    = ldata_i.valid;
    assign new_word = ldata_i.data[PAYLOAD_W-1:0];
  end else begin : g_two_part
    logic [LWORD_W-1:0] low_q;
    logic               low_v;
    always_ff @(posedge clk) begin
      if (rst) begin
        low_q <= '0;
        low_v <= 1'b0;
      end else if (ldata_i.valid && ldata_i.start && !ldata_i.last) begin
        low_q <= ldata_i.data;
        low_v <= 1'b1;
      end else if (ldata_i.valid && ldata_i.last) begin
        low_v <= 1'b0;
      end
    end
    // The second part completes the frame; a one-word packet is taken as is.
    assign new_v    = ldata_i.valid && ldata_i.last && (low_v || ldata_i.start);
    assign new_word = ldata_i.start ? PAYLOAD_W'(ldata_i.data)
                                    : {ldata_i.data[PAYLOAD_W-LWORD_W-1:0], low_q};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hold_q      <= '0;
      hold_v      <= 1'b0;
      pat_cnt     <= '0;
      gbt_data_o  <= '0;
      gbt_valid_o <= 1'b0;
      drop_o      <= 1'b0;
    end else begin
      if (lhc_stb_i) begin
        pat_cnt <= pat_cnt + 1'b1;
        if (pattern_sel_i) begin
          gbt_data_o  <= {GBT_TEST_PATTERN, pat_cnt};
          gbt_valid_o <= 1'b0;
        end else begin
          gbt_data_o  <= hold_v ? GBT_FRAME_W'(hold_q) : '0;
          gbt_valid_o <= hold_v;
        end
        hold_v <= new_v;
        if (new_v) hold_q <= new_word;
      end else if (new_v) begin
        if (hold_v) begin
          drop_o <= 1'b1;
        end else begin
          hold_q <= new_word;
          hold_v <= 1'b1;
        end
      end
    end
  end

  initial begin
    assert (PAYLOAD_W <= GBT_FRAME_W) else $error("gbt_tx_sorter: payload wider than a GBT frame");
  end

endmodule
