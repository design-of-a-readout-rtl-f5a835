// link_userside: test data source for the link protocol.
//
// A counter runs on txusrclk2 and advances whenever the transmitter takes a
// word (ready_i high). While the counter is below DATA_WORDS its value is
// offered as a user word with valid_o high; from DATA_WORDS to PERIOD-1
// valid_o is low, and the transmitter fills those slots with its CRC word
// and sync words. Each period is thus one message of the words
// 0, 1, ..., DATA_WORDS-1. With enable_i low the counter is held at zero and
// nothing is sent. data_o and valid_o follow the counter register directly;
// the bits of data_o above the counter width are always zero.
//
// DATA_WORDS = 31 (words 0x00..0x1e per message) follows the link test;
// the period of 64 words is this design's choice.
module link_userside #(
  parameter int unsigned DATA_WORDS = 31,
  parameter int unsigned PERIOD     = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable_i,
  input  logic        ready_i,
  output logic [63:0] data_o,
  output logic        valid_o
);

  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !enable_i)              cnt <= '0;
    else if (ready_i) cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
  end

  assign valid_o = enable_i && (cnt < CW'(DATA_WORDS));
  assign data_o  = 64'(cnt);

  initial begin
    assert (DATA_WORDS < PERIOD) else $error("link_userside: a period needs room for the CRC word");
  end

endmodule
