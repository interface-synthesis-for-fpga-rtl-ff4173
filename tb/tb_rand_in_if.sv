// tb_rand_in_if: self-checking testbench of the random-type input interface
// with the worked example of three BPEs (P = 10, inputs A, B, C read at
// steps 4, 0, 0, BPEs starting at steps 0, 4, 8).
//
// The expected schedule below (load step, frame skew, tagged line) was
// worked out by hand from the example, not taken from the design. The host
// model writes every word at the place that table gives; the array model
// checks that every BPE input shows the right word exactly at its read step
// n*P + tau + omega. Phase 1 feeds frames as fast as the interface takes
// them and checks that the array then runs one step per clock (no stall);
// phase 2 slows the host down and drops ext_ok, and checks that the stalls
// happen and the data stays right.
module tb_rand_in_if;
  localparam int W = 16, HW = 2, P = 10, B = 3, K = 3, NF = 2, L = 9;
  localparam int NITER = 24;          // array iterations checked
  localparam int NFAST = 10;          // iterations of phase 1

  // hand-derived schedule of the example
  localparam int TS   [L] = '{4, 8, 9, 6, 2, 3, 1, 5, 7};
  localparam int SKEW [L] = '{1, 0, 0, 1, 1, 1, 2, 1, 1};
  localparam int ROFF [L] = '{4, 0, 0, 8, 4, 4, 12, 8, 8};  // tau+omega

  logic clk = 0, rst_n = 0, go = 0, ext_ok = 1;
  logic h_we = 0, h_commit = 0, h_ready;
  logic [3:0] h_waddr = '0;
  logic [HW-1:0] h_wmask = '0;
  logic [HW-1:0][W-1:0] h_wdata = '0;
  logic [0:0] h_wr_slot;
  logic [L-1:0][W-1:0] arr_in;
  logic arr_en, period_start, period_end, stall;
  logic [3:0] step;

  int checks = 0, failures = 0;
  int cyc = 0, T = 0, stalls = 0, fast_en = 0, fast_cyc = 0, seen = 0;
  bit slow = 0, done_feed = 0;

  always #5 clk = ~clk;

  rand_in_if #(.W(W), .HW(HW), .P(P), .B(B), .K(K),
               .OMEGA({8'd0, 8'd0, 8'd4}), .TAU({8'd8, 8'd4, 8'd0}), .NF(NF)) dut (.*);

  function automatic logic [W-1:0] word(int n, int l);
    return W'((n * 37 + l * 11 + 5) & 16'hffff) ^ 16'h5a00;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d, array step %0d)", what, cyc, T);
    end
  endtask

  // host model
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  initial begin : host
    int slot, widx, n;
    logic [W-1:0] img [P];
    repeat (3) tick();
    rst_n = 1;
    tick();
    for (int h = 0; h < NITER + 3; h++) begin
      if (h == NFAST + 2) slow = 1;
      while (!h_ready) tick();
      slot = int'(h_wr_slot);
      // build the frame image, then write it two words per clock
      for (int r = 0; r < P; r++) img[r] = '0;
      for (int l = 0; l < L; l++) begin
        n = h - SKEW[l];
        img[TS[l]] = word(n, l);
      end
      for (int a = 0; a < P / HW; a++) begin
        widx = slot * P + a * HW;
        h_we    = 1;
        h_waddr = 4'(widx / HW);
        h_wmask = '1;
        for (int q = 0; q < HW; q++) h_wdata[q] = img[a * HW + q];
        tick();
      end
      h_we = 0;
      h_commit = 1;
      tick();
      h_commit = 0;
      if (h == 1) go = 1;
      if (slow) repeat ($urandom_range(0, 12)) tick();
    end
    done_feed = 1;
  end

  // ext_ok is dropped now and then in phase 2
  always @(posedge clk) ext_ok <= slow ? ($urandom_range(0, 3) != 0) : 1'b1;

  // array model and checker
  always @(posedge clk) begin
    automatic int nseen = 0;
    cyc <= cyc + 1;
    if (stall) stalls <= stalls + 1;
    if (arr_en) begin
      check(int'(step) == T % P, "step counter");
      for (int l = 0; l < L; l++)
        if (T >= ROFF[l] && (T - ROFF[l]) % P == 0 && (T - ROFF[l]) / P < NITER) begin
          check(arr_in[l] == word((T - ROFF[l]) / P, l),
                $sformatf("line %0d iteration %0d: got %h", l, (T - ROFF[l]) / P, arr_in[l]));
          nseen++;
        end
      seen <= seen + nseen;
      T <= T + 1;
    end
    if (T > 0 && T < NFAST * P) begin
      fast_cyc <= fast_cyc + 1;
      if (arr_en) fast_en <= fast_en + 1;
    end
  end

  initial begin : finish
    ifs_pkg::sched_t s;
    s = ifs_pkg::compute_schedule(P, B, K, ifs_pkg::omega_vec_t'({8'd0, 8'd0, 8'd4}),
                                  ifs_pkg::tau_vec_t'({8'd8, 8'd4, 8'd0}));
    check(s.b == 1, "minimum bus width b = 1");
    check(s.nregs == 4, "four shared buffer registers");
    check(s.tag[0] && !(|s.tag[8:1]), "only line 0 tagged");
    for (int l = 0; l < L; l++) begin
      check(int'(s.ts[l]) == TS[l], $sformatf("load step of line %0d", l));
      check(int'(s.skew[l]) == SKEW[l], $sformatf("skew of line %0d", l));
    end
    wait (T >= (NITER - 1) * P + 13);
    repeat (2) @(posedge clk);
    check(seen == NITER * L, $sformatf("all words seen (%0d)", seen));
    check(fast_en == fast_cyc, "full rate in phase 1: one array step per clock");
    check(stalls > 0, "stalls happened in phase 2");
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
