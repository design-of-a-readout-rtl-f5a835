// link_tx: transmitter logic of the synchronous 64b/66b link protocol.
//
// Everything runs on txusrclk2, the transceiver's TX user clock, so user data
// needs no clock crossing. The module
//  - counts txsequence 0..32 for the transceiver's TX synchronous gearbox.
//    With a 64-bit user interface over a 32-bit internal datapath the gearbox
//    cannot take a word when the sequence is 32; stopdata_o is high in that
//    cycle, the pipeline holds and user_ready_o is low, so a word offered
//    then must be offered again;
//  - sends, per accepted cycle, either the user word (header 01) while
//    user_valid_i is high, or, in the first cycle after the last user word,
//    the CRC control word (header 10, 32 zero bits above the CRC-32 of the
//    message), or else the synchronisation word 0x5555555555555555
//    (header 10) that keeps the far receiver aligned;
//  - with crc_err_inject_i high inverts bit 31 of the CRC it sends, so the
//    receiver's data-loss detection can be tested;
//  - scrambles the 64 payload bits (1 + x^39 + x^58); the header is sent
//    as is and delayed to stay with its word.
// rst_req_i (reset all, or TX link not active) is synchronised to txusrclk2.
//
// Timing: a user word accepted in cycle t is on txdata_o/txheader_o from
// cycle t+2 (word register, then scrambler register), counting only cycles
// in which the gearbox advances.
//
// The word types, headers, sync word, sequence counter and error injection
// follow the protocol description; the hold-on-pause handshake is this
// design's.
module link_tx
  import link_pkg::*;
(
  input  logic             clk,
  input  logic             rst_req_i,
  input  logic [63:0]      user_data_i,
  input  logic             user_valid_i,
  output logic             user_ready_o,
  input  logic             crc_err_inject_i,
  output logic [63:0]      txdata_o,
  output logic [1:0]       txheader_o,
  output logic [SEQ_W-1:0] txsequence_o,
  output logic             stopdata_o
);

  logic             rst;
  logic [SEQ_W-1:0] seq;
  logic             adv;         // gearbox takes a word this cycle
  logic             pending;     // a message is open: its CRC is still owed
  logic [63:0]      word_q;
  logic [1:0]       hdr_q, hdr_d;
  logic [31:0]      crc;
  logic             crc_init, crc_en;

  sync2ff #(.RESET_VAL(1'b1)) u_rst_sync (.clk, .d(rst_req_i), .q(rst));

  assign stopdata_o   = (seq == SEQ_W'(SEQ_MAX));
  assign adv          = !stopdata_o && !rst;
  assign user_ready_o = adv;
  assign txsequence_o = seq;

  always_ff @(posedge clk) begin
    if (rst)             seq <= '0;
    else if (stopdata_o) seq <= '0;
    else                 seq <= seq + 1'b1;
  end

  // CRC of the open message; restarted whenever no user word is taken.
  assign crc_en   = adv && user_valid_i;
  assign crc_init = rst || (adv && !user_valid_i);

  crc32_par64 u_crc (.clk, .init(crc_init), .en(crc_en), .data(user_data_i), .crc_o(crc));

  always_ff @(posedge clk) begin
    if (rst) begin
      word_q  <= SYNC_WORD;
      hdr_q   <= HDR_CTRL;
      hdr_d   <= HDR_CTRL;
      pending <= 1'b0;
    end else if (adv) begin
      hdr_d <= hdr_q;
      if (user_valid_i) begin
        word_q  <= user_data_i;
        hdr_q   <= HDR_DATA;
        pending <= 1'b1;
      end else if (pending) begin
        word_q  <= {32'h0, crc[31] ^ crc_err_inject_i, crc[30:0]};
        hdr_q   <= HDR_CTRL;
        pending <= 1'b0;
      end else begin
        word_q  <= SYNC_WORD;
        hdr_q   <= HDR_CTRL;
      end
    end
  end

  scrambler64 u_scr (.clk, .rst, .en(adv), .din(word_q), .dout(txdata_o));

  assign txheader_o = hdr_d;

endmodule
