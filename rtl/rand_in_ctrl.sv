// rand_in_ctrl: controller and address generator of the random-type input
// interface.
//
// A step counter t runs cyclically through the P time steps of the
// iteration period of BPE p0. In each step the controller
//   - issues the DPRAM read for the next step (row frame*P + t+1), so the
//     DPRAM output latch holds the row of step t during step t;
//   - raises the write enable of every shared buffer register that is due
//     to load in step t and selects the DPRAM lane it loads from.
// Both come from the schedule that ifs_pkg::compute_schedule() derives at
// elaboration time from P, the BPE start times TAU and the input read steps
// OMEGA, so the controller itself is a counter and a decoder.
//
// Frames: the DPRAM holds NF frames of P rows. The host fills the frame
// h_wr_slot and pulses h_commit; h_ready is low while all NF frames are
// committed and not yet consumed. One frame is consumed per iteration
// period. The very first frame is a prologue: it preloads the words the
// array needs at its first steps, and the array is held (arr_en low) while
// it is read. From the second frame on arr_en is high and step gives the
// array its time step.
//
// Stall: the controller only moves from step P-1 to step 0 if the next
// frame has been committed and ext_ok is high (the stream FIFOs are
// ready). Otherwise the counter, the DPRAM latch, the buffers and the array
// (arr_en) all hold, so the array sees the same schedule, only stretched.
// Reset (synchronous, active low) leaves the counter at step P-1 with no
// frame committed, so the first read after go is row 0 of frame 0.
// go low holds everything at once. period_start marks the clock edge
// after which an array period begins, period_end the edge that ends one. The frame handshake, the prologue frame
// and the stall are this design's choices; the cyclic schedule follows the
// described method.
module rand_in_ctrl #(
  parameter int P         = 10,
  parameter int B         = 3,
  parameter int K         = 3,
  parameter logic [K-1:0][7:0] OMEGA = {8'd0, 8'd0, 8'd4},
  parameter logic [B-1:0][7:0] TAU   = {8'd8, 8'd4, 8'd0},
  parameter int NF        = 2,
  localparam int L    = K * B,
  localparam int TW   = (P > 1) ? $clog2(P) : 1,
  localparam int SW   = (NF > 1) ? $clog2(NF) : 1,
  localparam int RAW  = (NF * P > 1) ? $clog2(NF * P) : 1,
  localparam ifs_pkg::sched_t S =
    ifs_pkg::compute_schedule(P, B, K, ifs_pkg::omega_vec_t'(OMEGA), ifs_pkg::tau_vec_t'(TAU)),
  localparam int BW   = int'(S.b),
  localparam int NREG = (S.nregs > 0) ? int'(S.nregs) : 1,
  localparam int LW   = (BW > 1) ? $clog2(BW) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            go,
  input  logic            ext_ok,
  // host frame handshake
  input  logic            h_commit,
  output logic            h_ready,
  output logic [SW-1:0]   h_wr_slot,
  // DPRAM read port
  output logic            dp_re,
  output logic [RAW-1:0]  dp_raddr,
  // buffer registers
  output logic [NREG-1:0]            buf_we,
  output logic [NREG-1:0][LW-1:0]  buf_sel,
  // array timing
  output logic            arr_en,
  output logic [TW-1:0]   step,
  output logic            period_start,
  output logic            period_end,
  output logic            stall
);



  logic [TW-1:0]  t;
  logic [SW-1:0]  frame;
  logic [SW-1:0]  wslot;
  logic           reading, running;
  logic [SW:0]    pending, occ;
  logic           en, at_end, nxt_slot_wrap, wslot_wrap;
  logic [SW-1:0]  frame_nxt;
  logic [TW-1:0]  t_nxt;

  assign at_end        = (t == TW'(P - 1));
  assign en            = go && (!at_end || (pending != '0 && (ext_ok || !reading)));
  assign nxt_slot_wrap = (frame == SW'(NF - 1));
  assign wslot_wrap    = (wslot == SW'(NF - 1));
  assign frame_nxt     = at_end ? (nxt_slot_wrap ? '0 : frame + 1'b1) : frame;
  assign t_nxt         = at_end ? '0 : t + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t       <= TW'(P - 1);
      frame   <= SW'(NF - 1);
      wslot   <= '0;
      reading <= 1'b0;
      running <= 1'b0;
      pending <= '0;
      occ     <= '0;
    end else begin
      if (en) begin
        t     <= t_nxt;
        frame <= frame_nxt;
        if (at_end) begin
          reading <= 1'b1;
          running <= reading;
        end
      end
      if (h_commit && h_ready) wslot <= wslot_wrap ? '0 : wslot + 1'b1;
      pending <= pending + (SW+1)'(h_commit && h_ready) - (SW+1)'(en && at_end);
      occ     <= occ + (SW+1)'(h_commit && h_ready) - (SW+1)'(en && at_end && reading);
    end
  end

  assign h_ready    = (occ < (SW+1)'(NF));
  assign h_wr_slot  = wslot;
  assign dp_re      = en;
  assign dp_raddr   = RAW'(int'(frame_nxt) * P + int'(t_nxt));
  assign arr_en     = en && running;
  assign step       = t;
  assign period_start = en && at_end && reading;
  assign period_end = en && at_end && running;
  assign stall      = go && !en;

  // buffer load strobes: every untagged line whose load step is t
  always_comb begin
    buf_we  = '0;
    buf_sel = '0;
    for (int l = 0; l < L; l++)
      if (!S.tag[l] && int'(S.ts[l]) == int'(t)) begin
        buf_we[int'(S.regid[l])]  = en;
        buf_sel[int'(S.regid[l])] = LW'(S.lane[l]);
      end
  end

  // the frame handshake: a commit is only legal while a frame is free
  assert property (@(posedge clk) disable iff (!rst_n) h_commit |-> h_ready)
    else $error("rand_in_ctrl: frame committed while no frame is free");

  initial begin
    assert (P <= ifs_pkg::MAXP && L <= ifs_pkg::MAXL && K <= ifs_pkg::MAXK && B <= ifs_pkg::MAXB)
      else $error("rand_in_ctrl: schedule larger than ifs_pkg limits");
    for (int i = 0; i < K; i++)
      assert (int'(OMEGA[i]) < P) else $error("rand_in_ctrl: OMEGA out of range");
    for (int i = 0; i < B; i++)
      assert (int'(TAU[i]) < P) else $error("rand_in_ctrl: TAU out of range");
  end

endmodule
