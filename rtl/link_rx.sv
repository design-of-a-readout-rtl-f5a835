// link_rx: receiver logic of the synchronous 64b/66b link protocol.
//
// Runs on rxusrclk2. Words from the transceiver's RX synchronous gearbox are
// taken only when rxdatavalid_i and rxheadervalid_i are high (the gearbox
// drops one cycle in 33). The payload is descrambled (one register stage)
// and its header delayed to match. Then:
//
// Alignment. The gearbox may cut the 66-bit blocks at a wrong bit position.
// A word is "misaligned" if its header is 00 or 11, or if it is a control
// word that is neither the sync word nor a CRC word. Every misaligned word
// clears the good-word counter and sync_ok_o and increments a wait counter;
// when that reaches SLIP_WAIT (32) rxgearboxslip_o pulses for one cycle,
// moving the block boundary by one bit, and the counter restarts, which gives
// the gearbox time to settle. Each correct sync word (header 10,
// 0x5555555555555555) increments the good-word counter; at SYNC_GOOD (8)
// sync_ok_o goes high and the wait counter is cleared. The wait counter is
// not cleared by single good words before that: the sync word is a period-2
// bit pattern, so a block boundary two bits off still decodes it correctly
// now and then, and such a position must not hold the search for long.
// Data and CRC words before sync are ignored, so that landing at the right
// position in the middle of a message does not count against it.
//
// Data and CRC. With sync_ok_o high, data words (header 01) go out on
// rxdata_o with a one-cycle rxdata_valid_o and feed the CRC-32. A CRC word
// (header 10, upper 32 bits zero) ends the message: its low 32 bits are
// compared with the local CRC; crc_match_o keeps the result; on a mismatch
// crc_error_o pulses, sync_ok_o drops and alignment starts again.
// rst_req_i (reset all, or RX link not active) is synchronised to rxusrclk2.
//
// Timing: a word taken from the gearbox in cycle t is on rxdata_o in cycle
// t+2. The counters, their limits and the reaction to a bad CRC follow the
// protocol description; ignoring data and CRC words before sync and keeping
// the wait counter until sync are this design's choices.
module link_rx
  import link_pkg::*;
(
  input  logic        clk,
  input  logic        rst_req_i,
  input  logic [63:0] rxdata_i,
  input  logic [1:0]  rxheader_i,
  input  logic        rxdatavalid_i,
  input  logic        rxheadervalid_i,
  output logic        rxgearboxslip_o,
  output logic        sync_ok_o,
  output logic        crc_match_o,
  output logic        crc_error_o,
  output logic [63:0] rxdata_o,
  output logic        rxdata_valid_o
);

  localparam int unsigned GW = $clog2(SYNC_GOOD + 1);
  localparam int unsigned BW = $clog2(SLIP_WAIT);

  logic          rst;
  logic          in_v, w_v;
  logic [63:0]   w_data;
  logic [1:0]    w_hdr;
  logic [GW-1:0] good_cnt;
  logic [BW-1:0] bad_cnt;
  logic [31:0]   crc;
  logic          is_ctrl, is_data, is_sync, is_crcw, misaligned;

  sync2ff #(.RESET_VAL(1'b1)) u_rst_sync (.clk, .d(rst_req_i), .q(rst));

  assign in_v = rxdatavalid_i && rxheadervalid_i;

  descrambler64 u_descr (.clk, .rst, .en(in_v), .din(rxdata_i), .dout(w_data));

  always_ff @(posedge clk) begin
    if (rst) begin
      w_hdr <= 2'b00;
      w_v   <= 1'b0;
    end else begin
      w_v <= in_v;
      if (in_v) w_hdr <= rxheader_i;
    end
  end

  assign is_ctrl    = (w_hdr == HDR_CTRL);
  assign is_data    = (w_hdr == HDR_DATA);
  assign is_sync    = is_ctrl && (w_data == SYNC_WORD);
  assign is_crcw    = is_ctrl && (w_data[63:32] == 32'h0);
  assign misaligned = (!is_ctrl && !is_data)
                   || (is_ctrl && !is_sync && !is_crcw);

  crc32_par64 u_crc (
    .clk,
    .init(rst || !sync_ok_o || (w_v && is_crcw)),
    .en(w_v && is_data && sync_ok_o),
    .data(w_data), .crc_o(crc));

  always_ff @(posedge clk) begin
    if (rst) begin
      good_cnt        <= '0;
      bad_cnt         <= '0;
      sync_ok_o       <= 1'b0;
      crc_match_o     <= 1'b0;
      crc_error_o     <= 1'b0;
      rxgearboxslip_o <= 1'b0;
      rxdata_o        <= '0;
      rxdata_valid_o  <= 1'b0;
    end else begin
      rxgearboxslip_o <= 1'b0;
      crc_error_o     <= 1'b0;
      rxdata_valid_o  <= 1'b0;
      if (w_v) begin
        if (misaligned) begin
          good_cnt  <= '0;
          sync_ok_o <= 1'b0;
          if (bad_cnt == BW'(SLIP_WAIT - 1)) begin
            rxgearboxslip_o <= 1'b1;
            bad_cnt         <= '0;
          end else begin
            bad_cnt <= bad_cnt + 1'b1;
          end
        end else if (is_sync) begin
          if (good_cnt != GW'(SYNC_GOOD)) good_cnt <= good_cnt + 1'b1;
          if (good_cnt >= GW'(SYNC_GOOD - 1)) begin
            sync_ok_o <= 1'b1;
            bad_cnt   <= '0;
          end
        end else if (is_crcw && sync_ok_o) begin
          if (w_data[31:0] == crc) begin
            crc_match_o <= 1'b1;
          end else begin
            crc_match_o <= 1'b0;
            crc_error_o <= 1'b1;
            sync_ok_o   <= 1'b0;
            good_cnt    <= '0;
          end
        end else if (is_data && sync_ok_o) begin
          rxdata_o       <= w_data;
          rxdata_valid_o <= 1'b1;
        end
      end
    end
  end

endmodule
