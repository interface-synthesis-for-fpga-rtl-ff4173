// stream_fifo: FIFO buffer between a stream-type data source or sink (a
// sensor group, an audio or video stream) and the processor array.
//
// First-word-fall-through FIFO of DEPTH words: dout is the oldest word
// while empty is low; pop removes it, push appends din. Push and pop in the
// same clock are allowed, also when full (the word leaving makes room).
// count is the number of words held. Assertions flag a push into a full
// FIFO (without pop) and a pop from an empty one.
//
// Timing: a pushed word can be popped on the next clock. The FIFO buffer
// itself follows the described stream port; depth, fall-through output and
// the handshake are this design's choices.
module stream_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 16,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("stream_fifo: push into a full FIFO");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("stream_fifo: pop from an empty FIFO");

endmodule
