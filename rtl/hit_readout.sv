// hit_readout: Readout Hit module. Buffers the sector's TDC hits and sorts
// them onto two GBT lanes.
//
// A middle FIFO that is almost full stops its merger, so words wait in the
// first-stage FIFOs; only those can overflow.
//
// Input: N_HIT_IN 32-bit hit lanes from the sector processor, one per OBDT
// input, on clkp; an all-zero lane carries no hit. Three stages follow.
//  1. Packing (registered): hits 2k and 2k+1 form 64-bit word k, hit 2k in
//     bits 31:0 and hit 2k+1 in bits 63:32. With 13 lanes the seventh word
//     holds hit 12 in its low half and zeroes above. Each non-zero word is
//     written into its own FIFO (7 FIFOs).
//  2. The 7 FIFOs are sorted onto 4 lanes: FIFO pairs (0,1), (2,3), (4,5)
//     share a lane through a lane_merger, FIFO 6 owns lane 3. Each lane feeds
//     one of 4 further FIFOs.
//  3. Those 4 FIFOs are sorted onto 2 output lanes, pairs (0,1) and (2,3).
//     This stage issues at most one word per OUT_GAP cycles per lane (one
//     per LHC clock at the default 9), which is what one GBT link carries.
// Output: two lword lanes; every word is a one-word packet (valid, start and
// last together), data field as packed in stage 1.
//
// The packing, FIFO counts and the sorting rule follow the readout
// description; which half a hit takes, which FIFOs are paired, and the
// output pacing are this design's choices. Latency with empty FIFOs:
// 1 (packing) + 2 (FIFO) + 1 (merger) + 2 (FIFO) + 1 (merger) = 7 clkp.
// The strobe flag of the lanes is constant 1: every clkp cycle is a word
// slot of the lane, whether or not it carries a word.
module hit_readout
  import readout_pkg::*;
#(
  parameter int unsigned N_HIT      = N_HIT_IN,
  parameter int unsigned DEPTH      = FIFO_DEPTH,
  parameter int unsigned OUT_GAP    = CLK_RATIO,
  localparam int unsigned N_W1 = (N_HIT + 1) / 2,  // packed words / first FIFOs
  localparam int unsigned N_W2 = (N_W1 + 1) / 2    // middle FIFOs
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [HIT_W-1:0]  hits_i [N_HIT],
  output lword_t            lane_o [2],
  output logic [N_W1+N_W2-1:0] overflow_o
);

  // ---------------------------------------------------------------- stage 1
  logic [LWORD_W-1:0] word_q [N_W1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_W1; k++) word_q[k] <= '0;
    end else begin
      for (int k = 0; k < N_W1; k++) begin
        word_q[k][HIT_W-1:0] <= hits_i[2*k];
        word_q[k][LWORD_W-1:HIT_W] <= (2*k + 1 < N_HIT) ? hits_i[(2*k + 1 < N_HIT) ? 2*k + 1 : 0] : '0;
      end
    end
  end

  logic [LWORD_W-1:0] f1_dout  [N_W1];
  logic [N_W1-1:0]    f1_empty, f1_rd, f1_ovf;

  for (genvar k = 0; k < N_W1; k++) begin : g_f1
    bram_fifo #(.WIDTH(LWORD_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst,
      .wr_en(word_q[k] != '0), .din(word_q[k]),
      .rd_en(f1_rd[k]), .dout(f1_dout[k]), .empty(f1_empty[k]),
      .full(), .almost_full(), .overflow(f1_ovf[k]));
  end

  // ---------------------------------------------------------------- stage 2
  logic [LWORD_W-1:0] l2_data [N_W2];
  logic [N_W2-1:0]    l2_valid;
  logic [N_W2-1:0]    f2_afull;   // middle FIFOs almost full

  for (genvar j = 0; j < N_W2; j++) begin : g_m2
    if (2*j + 1 < N_W1) begin : g_pair
      lane_merger #(.W(LWORD_W), .MIN_GAP(1)) u_merge (
        .clk, .rst,
        .a_empty(f1_empty[2*j]),   .a_dout(f1_dout[2*j]),   .a_rd(f1_rd[2*j]),
        .b_empty(f1_empty[2*j+1]), .b_dout(f1_dout[2*j+1]), .b_rd(f1_rd[2*j+1]),
        .out_ready(!f2_afull[j]), .out_valid(l2_valid[j]), .out_data(l2_data[j]));
    end else begin : g_single
      logic unused_rd;
      lane_merger #(.W(LWORD_W), .MIN_GAP(1)) u_merge (
        .clk, .rst,
        .a_empty(f1_empty[2*j]), .a_dout(f1_dout[2*j]), .a_rd(f1_rd[2*j]),
        .b_empty(1'b1), .b_dout('0), .b_rd(unused_rd),
        .out_ready(!f2_afull[j]), .out_valid(l2_valid[j]), .out_data(l2_data[j]));
    end
  end

  logic [LWORD_W-1:0] f2_dout [N_W2];
  logic [N_W2-1:0]    f2_empty, f2_rd, f2_ovf;

  for (genvar j = 0; j < N_W2; j++) begin : g_f2
    bram_fifo #(.WIDTH(LWORD_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst,
      .wr_en(l2_valid[j]), .din(l2_data[j]),
      .rd_en(f2_rd[j]), .dout(f2_dout[j]), .empty(f2_empty[j]),
      .full(), .almost_full(f2_afull[j]), .overflow(f2_ovf[j]));
  end

  // ---------------------------------------------------------------- stage 3
  for (genvar o = 0; o < 2; o++) begin : g_m3
    logic               v;
    logic [LWORD_W-1:0] d;
    lane_merger #(.W(LWORD_W), .MIN_GAP(OUT_GAP)) u_merge (
      .clk, .rst,
      .a_empty(f2_empty[2*o]),   .a_dout(f2_dout[2*o]),   .a_rd(f2_rd[2*o]),
      .b_empty(f2_empty[2*o+1]), .b_dout(f2_dout[2*o+1]), .b_rd(f2_rd[2*o+1]),
      .out_ready(1'b1), .out_valid(v), .out_data(d));
    assign lane_o[o] = '{valid: v, start: v, last: v, strobe: 1'b1, data: d};
  end

  assign overflow_o = {f2_ovf, f1_ovf};

  initial begin
    assert (N_W2 == 4) else $error("hit_readout: sorting tree expects 4 middle lanes (13 or 14 hit inputs)");
  end

endmodule
