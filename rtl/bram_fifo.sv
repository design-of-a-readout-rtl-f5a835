// bram_fifo: common-clock FIFO used for every readout buffer.
//
// The readout stores its words in FIFOs built on one block RAM each, a
// RAMB36E2 in its 72 x 512 mode of which 64 bits are used. This module is a
// portable equivalent: a DEPTH x WIDTH memory with a synchronous read port,
// followed by a one-word output register that makes it first-word-fall-
// through: while `empty` is low, `dout` already holds the oldest word, and
// `rd_en` pops it. A write while `full` is high is dropped and sets the
// sticky `overflow` flag; `almost_full` rises one word earlier, for writers
// that need a cycle to stop. Up to DEPTH words sit in the RAM and one more in
// the output register.
//
// Timing: a word written in cycle t appears on dout (empty low) in cycle t+2
// when the FIFO was empty. After a pop the next word is on dout in the next
// cycle, so a word can be popped every cycle.
//
// Depth and width follow the block RAM configuration of the readout; the
// fall-through read port, the drop-on-full policy and the synchronous reset
// are this design's choices.
module bram_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             almost_full,
  output logic             overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      ram_count;     // words held in the RAM
  logic             out_valid;     // output register holds a word
  logic [WIDTH-1:0] out_q;
  logic             wr_ok, pop, load;

  assign full  = (ram_count == (AW+1)'(DEPTH));
  // One word short of full: lets a writer with one cycle of delay stop in time.
  assign almost_full = (ram_count >= (AW+1)'(DEPTH - 1));
  assign wr_ok = wr_en && !full;
  assign pop   = rd_en && out_valid;
  // Refill the output register when it is free or being emptied.
  assign load  = (ram_count != '0) && (!out_valid || pop);

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // RAM: write port and registered read port, no reset (block RAM style).
  always_ff @(posedge clk) begin
    if (wr_ok) mem[wr_ptr] <= din;
    if (load)  out_q <= mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      ram_count <= '0;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      if (wr_ok) wr_ptr <= next_ptr(wr_ptr);
      if (load)  rd_ptr <= next_ptr(rd_ptr);
      ram_count <= ram_count + (AW+1)'(wr_ok) - (AW+1)'(load);
      if (load)     out_valid <= 1'b1;
      else if (pop) out_valid <= 1'b0;
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  assign dout  = out_q;
  assign empty = !out_valid;

endmodule
