// ifs_pkg: shared types and the elaboration-time schedule synthesis for the
// random-type input interface.
//
// A random-type input of a border processor element (BPE) must receive one
// data word per iteration period P. The words come from a dual-port RAM
// whose array-side port carries b words per clock. compute_schedule() works
// out, from the BPE start times tau and the input read steps omega, which
// word travels over which DPRAM lane in which time step, and which buffer
// register holds it until the BPE reads it:
//
//   1. "line" l = i*K + j is input a_j of BPE p_i. Its read step modulo P is
//      wt(l) = (omega(a_j) + tau(p_i)) mod P; wrap(l) is the quotient.
//   2. b = ceil(K*B / P) is the minimum DPRAM read width.
//   3. b lines are "tagged": they read the DPRAM output latch directly and
//      get no buffer register. The column of the lowest-numbered line whose
//      column holds at least b ones is taken, and its first b lines (in line
//      order) are tagged. All other lines must be loaded one step before the
//      read, so their latest load step is wt(l)-1 (mod P).
//   4. Peak removal: columns are visited from P-1 down to 0; while a column
//      holds more than b loads, the first untagged line in it is moved to
//      the nearest earlier column (cyclically) that holds fewer than b loads.
//      The result is the load step ts(l) of every line.
//   5. Each untagged line occupies its buffer from ts(l) to wt(l), both ends
//      included, cyclically. Lines are packed greedily, in line order, onto
//      shared registers whose occupied steps do not intersect.
//   6. Within one load step the loaded lines take DPRAM lanes 0,1,.. in line
//      order. skew(l) tells the host in which frame, relative to the array's
//      iteration number, the word of line l has to be placed (see
//      rand_in_if).
//
// Steps 1-5 follow the method this interface is built on; the tie-breaking
// choices (which column is tagged, t restarting at the visited column, the
// interval end points, lane order) and step 6 are this design's own. In the
// sharing step every candidate is checked against all intervals already on
// the register, not only the first one, so that no two words can collide.
//
// Limits: K*B <= MAXL lines, P <= MAXP, every tau and omega below P.
package ifs_pkg;

  localparam int MAXL = 64;   // most BPE inputs (K*B) one schedule can hold
  localparam int MAXP = 128;  // longest iteration period
  localparam int MAXK = 16;   // most inputs per BPE
  localparam int MAXB = 32;   // most BPEs

  typedef logic [7:0] u8_t;

  typedef u8_t [MAXK-1:0] omega_vec_t;
  typedef u8_t [MAXB-1:0] tau_vec_t;

  // Complete schedule of one random-type input interface.
  typedef struct packed {
    u8_t                 nlines;  // K*B
    u8_t                 b;       // DPRAM read width in words
    u8_t                 nregs;   // number of shared buffer registers
    logic [MAXL-1:0]     tag;     // line reads the DPRAM latch directly
    u8_t  [MAXL-1:0]     wt;      // read step modulo P
    u8_t  [MAXL-1:0]     wrap;    // floor((omega+tau)/P)
    u8_t  [MAXL-1:0]     ts;      // load step (latch step for tagged lines)
    u8_t  [MAXL-1:0]     lane;    // DPRAM lane that carries the line's word
    u8_t  [MAXL-1:0]     regid;   // shared buffer register of an untagged line
    u8_t  [MAXL-1:0]     skew;    // frame offset of the line's words
  } sched_t;

  function automatic int ceil_div(input int a, input int d);
    return (a + d - 1) / d;
  endfunction

  function automatic sched_t compute_schedule(input int P, input int B,
                                              input int K,
                                              input omega_vec_t om,
                                              input tau_vec_t tau);
    sched_t s;
    int L, b, w, jt, k, t, nr, c, cnt;
    int col  [MAXL];
    int dcol [MAXL];
    int sig  [MAXP];
    logic [MAXP-1:0] imask [MAXL];
    logic [MAXP-1:0] rmask [MAXL];
    logic [MAXP-1:0] m;
    bit found, fits;

    s  = '0;
    L  = K * B;
    b  = ceil_div(L, P);
    s.nlines = u8_t'(L);
    s.b      = u8_t'(b);

    // 1. read steps (matrix Delta)
    for (int l = 0; l < MAXL; l++) begin
      col[l] = 0; dcol[l] = 0; imask[l] = '0; rmask[l] = '0;
    end
    for (int l = 0; l < L; l++) begin
      w = int'(om[l % K]) + int'(tau[l / K]);
      dcol[l]   = w % P;
      s.wt[l]   = u8_t'(w % P);
      s.wrap[l] = u8_t'(w / P);
    end

    // 3. tagging
    for (int j = 0; j < MAXP; j++) sig[j] = 0;
    for (int l = 0; l < L; l++) sig[dcol[l]]++;
    jt = -1;
    for (int l = 0; l < L; l++)
      if (jt < 0 && sig[dcol[l]] >= b) jt = dcol[l];
    cnt = 0;
    for (int l = 0; l < L; l++)
      if (dcol[l] == jt && cnt < b) begin
        s.tag[l] = 1'b1;
        cnt++;
      end

    // rotation of the untagged lines by one step
    for (int l = 0; l < L; l++)
      col[l] = s.tag[l] ? dcol[l] : (dcol[l] + P - 1) % P;

    // 4. peak removal (matrix Delta*)
    for (int j = 0; j < MAXP; j++) sig[j] = 0;
    for (int l = 0; l < L; l++) sig[col[l]]++;
    for (int j = P - 1; j >= 0; j--) begin
      k = 0;
      t = j;
      while (sig[j] > b) begin
        while (sig[t] >= b) t = (t + P - 1) % P;
        while (col[k] != j || s.tag[k]) k++;
        col[k] = t;
        sig[j]--;
        sig[t]++;
      end
    end
    for (int l = 0; l < L; l++) s.ts[l] = u8_t'(col[l]);

    // 5. occupied steps and greedy register sharing
    for (int l = 0; l < L; l++)
      if (!s.tag[l]) begin
        m = '0;
        if (col[l] == dcol[l]) begin
          for (int x = 0; x < P; x++) m[x] = 1'b1;
        end else begin
          c = col[l];
          m[c] = 1'b1;
          while (c != dcol[l]) begin
            c = (c + 1) % P;
            m[c] = 1'b1;
          end
        end
        imask[l] = m;
      end
    nr = 0;
    for (int l = 0; l < L; l++)
      if (!s.tag[l]) begin
        found = 1'b0;
        for (int r = 0; r < nr; r++) begin
          fits = ((rmask[r] & imask[l]) == '0);
          if (!found && fits) begin
            rmask[r]   = rmask[r] | imask[l];
            s.regid[l] = u8_t'(r);
            found      = 1'b1;
          end
        end
        if (!found) begin
          rmask[nr]  = imask[l];
          s.regid[l] = u8_t'(nr);
          nr++;
        end
      end
    s.nregs = u8_t'(nr);

    // 6. lanes and frame skew
    for (int j = 0; j < P; j++) begin
      cnt = 0;
      for (int l = 0; l < L; l++)
        if (col[l] == j) begin
          s.lane[l] = u8_t'(cnt);
          cnt++;
        end
    end
    for (int l = 0; l < L; l++) begin
      if (s.tag[l] || col[l] < dcol[l])
        s.skew[l] = u8_t'(1 + int'(s.wrap[l]));
      else
        s.skew[l] = u8_t'(int'(s.wrap[l]));
    end
    return s;
  endfunction

endpackage
