// rand_in_harness: host and array model around one rand_in_if instance,
// for testing the random-input interface with any schedule parameters.
//
// The host places every word by the schedule of ifs_pkg (load step, lane,
// frame skew), one word per write, with random pauses between frames. The
// array model checks independently of that schedule: line l = i*K+j must
// show the word of iteration n exactly in array step n*P + TAU[i] +
// OMEGA[j]. The harness also checks the schedule's own promises: no step
// loads more than b words, and no two lines on one shared register hold
// it in the same step. It reports its counts and raises done at the end.
module rand_in_harness #(
  parameter int W  = 16,
  parameter int HW = 2,
  parameter int P  = 10,
  parameter int B  = 3,
  parameter int K  = 3,
  parameter logic [K-1:0][7:0] OMEGA = {8'd0, 8'd0, 8'd4},
  parameter logic [B-1:0][7:0] TAU   = {8'd8, 8'd4, 8'd0},
  parameter int NF    = 2,
  parameter int NITER = 12
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int L = K * B;
  localparam ifs_pkg::sched_t S =
    ifs_pkg::compute_schedule(P, B, K, ifs_pkg::omega_vec_t'(OMEGA), ifs_pkg::tau_vec_t'(TAU));
  localparam int BW    = int'(S.b);
  localparam int DEPTH = NF * P * BW;
  localparam int HAW   = (DEPTH / HW > 1) ? $clog2(DEPTH / HW) : 1;
  localparam int TW    = (P > 1) ? $clog2(P) : 1;
  localparam int SW    = (NF > 1) ? $clog2(NF) : 1;

  logic rst_n = 0, go = 0, ext_ok = 1;
  logic h_we = 0, h_commit = 0, h_ready;
  logic [HAW-1:0] h_waddr = '0;
  logic [HW-1:0] h_wmask = '0;
  logic [HW-1:0][W-1:0] h_wdata = '0;
  logic [SW-1:0] h_wr_slot;
  logic [L-1:0][W-1:0] arr_in;
  logic arr_en, period_start, period_end, stall;
  logic [TW-1:0] step;

  rand_in_if #(.W(W), .HW(HW), .P(P), .B(B), .K(K), .OMEGA(OMEGA), .TAU(TAU), .NF(NF)) dut (.*);

  int T = 0;

  function automatic logic [W-1:0] word(int n, int l);
    return W'(n * 53 + l * 17 + P) ^ W'(16'h6b00);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL P=%0d B=%0d K=%0d: %s (array step %0d)", P, B, K, what, T);
    end
  endtask
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // line l holds its register in step t (load step to read step, cyclic)
  function automatic bit held(int l, int t);
    if (S.ts[l] == S.wt[l]) return 1'b1;
    return ((t - int'(S.ts[l]) + P) % P) <= ((int'(S.wt[l]) - int'(S.ts[l]) + P) % P);
  endfunction

  initial begin : schedule_rules
    int sig [P];
    bit clash, ha, hc;
    checks = 0; failures = 0; done = 0;
    for (int t = 0; t < P; t++) sig[t] = 0;
    for (int l = 0; l < L; l++) sig[S.ts[l]]++;
    for (int t = 0; t < P; t++) check(sig[t] <= BW, $sformatf("step %0d loads at most b words", t));
    check(BW == (L + P - 1) / P, "b is the minimum width");
    // shared registers: held steps from load to read, both included
    for (int a = 0; a < L; a++)
      for (int c = a + 1; c < L; c++)
        if (!S.tag[a] && !S.tag[c] && S.regid[a] == S.regid[c]) begin
          clash = 0;
          for (int t = 0; t < P; t++) begin
            ha = held(a, t);
            hc = held(c, t);
            if (ha && hc) clash = 1;
          end
          check(!clash, $sformatf("lines %0d and %0d share a register without overlap", a, c));
        end
  end

  initial begin : host
    int slot, n, widx;
    repeat (3) tick();
    rst_n = 1;
    tick();
    for (int h = 0; h < NITER + 3; h++) begin
      while (!h_ready) tick();
      slot = int'(h_wr_slot);
      for (int l = 0; l < L; l++) begin
        n = h - int'(S.skew[l]);
        widx = slot * P * BW + int'(S.ts[l]) * BW + int'(S.lane[l]);
        h_we = 1;
        h_waddr = HAW'(widx / HW);
        h_wmask = HW'(1) << (widx % HW);
        h_wdata = '0;
        h_wdata[widx % HW] = word(n, l);
        tick();
      end
      h_we = 0;
      h_commit = 1; tick(); h_commit = 0;
      if (h == 1) go = 1;
      repeat ($urandom_range(0, P)) tick();
    end
  end

  always @(posedge clk) ext_ok <= ($urandom_range(0, 5) != 0);

  int seen = 0;
  always @(posedge clk) begin
    automatic int r, ns = 0;
    if (arr_en) begin
      check(int'(step) == T % P, "step counter");
      for (int l = 0; l < L; l++) begin
        r = T - int'(OMEGA[l % K]) - int'(TAU[l / K]);
        if (r >= 0 && r % P == 0 && r / P < NITER) begin
          check(arr_in[l] == word(r / P, l), $sformatf("line %0d iteration %0d", l, r / P));
          ns++;
        end
      end
      seen <= seen + ns;
      T <= T + 1;
    end
  end

  initial begin : finish
    wait (T >= (NITER + 1) * P);
    repeat (2) @(posedge clk);
    check(seen == NITER * L, $sformatf("all %0d words seen (%0d)", NITER * L, seen));
    $display("P=%0d B=%0d K=%0d: b=%0d registers=%0d (of %0d lines)", P, B, K, BW, S.nregs, L);
    done = 1;
  end
endmodule
