// rand_in_buffers: buffer registers between the DPRAM output bus and the
// random-type inputs of the border processor elements.
//
// The DPRAM output latch carries b words per step. A line (BPE input) that
// the schedule tags is wired straight to its DPRAM lane: the latch itself
// holds its word in the step the BPE reads it. Every other line reads one of
// the NREG shared registers. Register r loads the lane buf_sel[r] when
// buf_we[r] is high (strobes from rand_in_ctrl), and is wired to all lines
// the schedule assigned to it; their occupation intervals do not overlap, so
// at each BPE read step the register holds that BPE's word.
//
// Timing: a register loaded at the end of step s is read in a later step
// (at the latest s+1). Registers reset to zero (synchronous, active-low).
// The structure follows the described DPRAM/buffer-register scheme; the
// reset value is this design's choice.
module rand_in_buffers #(
  parameter int W         = 16,
  parameter int P         = 10,
  parameter int B         = 3,
  parameter int K         = 3,
  parameter logic [K-1:0][7:0] OMEGA = {8'd0, 8'd0, 8'd4},
  parameter logic [B-1:0][7:0] TAU   = {8'd8, 8'd4, 8'd0},
  localparam int L = K * B,
  localparam ifs_pkg::sched_t S =
    ifs_pkg::compute_schedule(P, B, K, ifs_pkg::omega_vec_t'(OMEGA), ifs_pkg::tau_vec_t'(TAU)),
  localparam int BW   = int'(S.b),
  localparam int NREG = (S.nregs > 0) ? int'(S.nregs) : 1,
  localparam int LW   = (BW > 1) ? $clog2(BW) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [BW-1:0][W-1:0]        dp_rdata,
  input  logic [NREG-1:0]             buf_we,
  input  logic [NREG-1:0][LW-1:0]   buf_sel,
  output logic [L-1:0][W-1:0]           arr_in
);



  logic [NREG-1:0][W-1:0] r;

  always_ff @(posedge clk) begin
    if (!rst_n) r <= '0;
    else
      for (int i = 0; i < NREG; i++)
        if (buf_we[i]) r[i] <= dp_rdata[buf_sel[i]];
  end

  always_comb
    for (int l = 0; l < L; l++)
      arr_in[l] = S.tag[l] ? dp_rdata[int'(S.lane[l])] : r[int'(S.regid[l])];

endmodule
