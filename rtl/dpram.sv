// dpram: dual-port RAM with different port widths, as used to buffer host
// data in front of the processor array.
//
// The memory is an array of DEPTH words of W bits. The write port (host
// side) writes WR_WORDS consecutive words per clock at word address
// waddr*WR_WORDS, with one enable bit per word in wmask. The read port
// (array side) reads RD_WORDS consecutive words at word address
// raddr*RD_WORDS into an output latch: rdata is valid on the clock after re
// and is held while re is low. That latch is the "DPRAM output latch" the
// schedule uses as a buffer for the tagged BPE inputs.
//
// Timing: one clock for both ports (the interface runs on the array clock).
// A read of a word written in the same clock returns the old contents.
// Mixed port widths follow the described block-RAM use; a single clock, the
// write mask and the read-before-write behaviour are this design's choices.
// DEPTH must be a multiple of both port widths.
module dpram #(
  parameter int W        = 16,
  parameter int WR_WORDS = 2,
  parameter int RD_WORDS = 1,
  parameter int DEPTH    = 20,
  localparam int WAW = (DEPTH / WR_WORDS > 1) ? $clog2(DEPTH / WR_WORDS) : 1,
  localparam int RAW = (DEPTH / RD_WORDS > 1) ? $clog2(DEPTH / RD_WORDS) : 1
) (
  input  logic                         clk,
  // host write port
  input  logic                         we,
  input  logic [WAW-1:0]               waddr,
  input  logic [WR_WORDS-1:0]          wmask,
  input  logic [WR_WORDS-1:0][W-1:0]   wdata,
  // array read port
  input  logic                         re,
  input  logic [RAW-1:0]               raddr,
  output logic [RD_WORDS-1:0][W-1:0]   rdata
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    assert (DEPTH % WR_WORDS == 0 && DEPTH % RD_WORDS == 0)
      else $error("dpram: DEPTH must be a multiple of both port widths");
  end

  always_ff @(posedge clk) begin
    if (we)
      for (int i = 0; i < WR_WORDS; i++)
        if (wmask[i]) mem[int'(waddr) * WR_WORDS + i] <= wdata[i];
  end

  always_ff @(posedge clk) begin
    if (re)
      for (int i = 0; i < RD_WORDS; i++)
        rdata[i] <= mem[int'(raddr) * RD_WORDS + i];
  end

endmodule
