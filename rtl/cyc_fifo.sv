// cyc_fifo: feedback FIFO for one cyclic-type array input.
//
// A chain of DEPTH registers with a multiplexer in front of the first one.
// While ld is high the multiplexer takes the host word din and the chain
// shifts by one: DEPTH loads fill it, the first word loaded ends at the
// output dout. While rot is high the multiplexer takes the chain's own
// output, so the chain rotates and dout steps through the stored sequence
// again and again. ld wins if both are high. The stored sequence is set
// before a computation and replayed, one word per rot pulse, during it.
//
// Timing: dout changes on the clock edge where ld or rot is high. The
// shift-register structure with the feedback multiplexer follows the
// described structure; ld priority and the reset to zero are this design's.
module cyc_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] din,
  input  logic         rot,
  output logic [W-1:0] dout
);

  logic [DEPTH-1:0][W-1:0] q;
  logic [W-1:0]            mux;

  assign mux  = ld ? din : q[DEPTH-1];
  assign dout = q[DEPTH-1];

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else if (ld || rot) begin
      q[0] <= mux;
      for (int i = 1; i < DEPTH; i++) q[i] <= q[i-1];
    end
  end

endmodule
