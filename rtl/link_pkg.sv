// link_pkg: constants of the synchronous 64b/66b link protocol.
//
// Every 66-bit block carries a 2-bit header: 01 marks a user data word, 10 a
// control word. Control words are either the synchronisation word
// 0x5555555555555555 or the CRC word, whose upper 32 bits are zero and whose
// lower 32 bits are the CRC-32 of the message's data words. The TX gearbox
// sequence counts 0..32 and pauses the datapath at 32. The receiver declares
// sync after 8 good sync words and slips the RX gearbox one bit after 32
// misaligned words.
package link_pkg;

  localparam logic [1:0]  HDR_DATA  = 2'b01;
  localparam logic [1:0]  HDR_CTRL  = 2'b10;
  localparam logic [63:0] SYNC_WORD = 64'h5555_5555_5555_5555;
  localparam int unsigned SEQ_MAX   = 32;   // txsequence runs 0..SEQ_MAX
  localparam int unsigned SEQ_W     = 7;    // width of the gearbox sequence port
  localparam int unsigned SYNC_GOOD = 8;    // good sync words needed for sync_ok
  localparam int unsigned SLIP_WAIT = 32;   // bad words before a gearbox slip
  localparam logic [31:0] CRC_POLY  = 32'h04C1_1DB7; // IEEE 802.3
  localparam logic [31:0] CRC_INIT  = 32'hFFFF_FFFF;

  // Control register 0 bit map (ctrl node of the address table).
  localparam int unsigned CTRL_WRITE_USER = 0;
  localparam int unsigned CTRL_RST_TX     = 1;
  localparam int unsigned CTRL_RST_RX     = 2;
  localparam int unsigned CTRL_CRC_ERROR  = 3;
  localparam int unsigned CTRL_LOOPBACK   = 4;  // bits 6:4
  // Status register 0 bit map.
  localparam int unsigned STAT_SYNCLOCK   = 0;

endpackage
