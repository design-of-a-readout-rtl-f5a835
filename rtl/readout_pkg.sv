// readout_pkg: types and constants shared by the BMTL1 readout blocks.
//
// The payload exchanges data with the link firmware as "lwords": a 64-bit
// data field with valid, start (first word of a packet), last (last word of a
// packet) and strobe flags. The readout runs on clkp, which is nine times the
// 40.078 MHz LHC clock, and sends its data over GBT links whose frames are 84
// bits wide and leave once per LHC clock. The numbers below are those of the
// one-sector readout: 13 hit lanes of 32 bits, 4 TP lanes, 4 CSP track links,
// FIFOs of 512 x 64 bits, 6 GBT links. The test pattern's upper 60 bits are
// this design's reading of the 0xCABAB... constant.
package readout_pkg;

  localparam int unsigned LWORD_W      = 64;  // lword data field
  localparam int unsigned GBT_FRAME_W  = 84;  // GBT user frame (80 data + 4 slow control)
  localparam int unsigned CLK_RATIO    = 9;   // clkp cycles per LHC clock
  localparam int unsigned HIT_W        = 32;  // one TDC hit word
  localparam int unsigned N_HIT_IN     = 13;  // hit lanes from the sector
  localparam int unsigned N_TP         = 4;   // one TP lane per chamber MB1..MB4
  localparam int unsigned TPG_READOUT_SIZE = 64; // TP frame width
  localparam int unsigned N_CSP_LINKS  = 4;   // CSP links carrying tracks
  localparam int unsigned MUON_LINK    = 0;   // which of them is read
  localparam int unsigned FIFO_DEPTH   = 512; // one RAMB36E2 in 72x512 mode
  localparam int unsigned N_GBT        = 6;   // GBT links of one sector's readout
  localparam int unsigned PATTERN_CNT_W = 24; // counter bits of the test pattern
  localparam logic [GBT_FRAME_W-PATTERN_CNT_W-1:0] GBT_TEST_PATTERN = 60'hCAB_ABAB_ABAB_ABAB;

  typedef struct packed {
    logic                valid;
    logic                start;
    logic                last;
    logic                strobe;
    logic [LWORD_W-1:0]  data;
  } lword_t;

  localparam lword_t LWORD_NULL = '{valid: 1'b0, start: 1'b0, last: 1'b0, strobe: 1'b1, data: '0};

endpackage
