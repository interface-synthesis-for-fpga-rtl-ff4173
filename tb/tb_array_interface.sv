// tb_array_interface: end-to-end test of the complete array interface at
// its default parameters (the three-BPE example: P = 10, inputs A, B, C
// read at steps 4, 0, 0, BPEs starting at steps 0, 4, 8; 2 constants,
// 2 cyclic FIFOs of 5 words, one stream input and one stream output).
//
// The testbench plays host, sensor, sink and processor array:
//   - host: loads the constants and cyclic sequences (first by address,
//     then again through the counter-mode channel), then streams NITER+3
//     random-input frames, placing each word by a hand-derived table
//     (load step and frame skew per BPE input); fast at first, then slow;
//   - sensor: pushes the stream input words, with a long pause;
//   - sink: pops the stream output, with a long pause;
//   - array: in every enabled step checks the constants, the cyclic words
//     (word n mod 5 in period n), the stream input word n, and every random
//     input exactly at its read step n*P + tau + omega; it drives the stream
//     output word of period n.
// It counts how often each mechanism happened (stall for a missing frame,
// for an empty stream input, for a full stream output; host held off by a
// full DPRAM; reads served straight from the DPRAM latch; reads from
// shared buffer registers; cyclic wrap-around; counter-mode loading) and
// counts a failure for any that never happened. Phase 1 must run at one
// array step per clock.
module tb_array_interface;
  localparam int W = 16, HW = 2, P = 10, L = 9, NC = 2, NY = 2, D = 5;
  localparam int NITER = 45, NFAST = 8;
  localparam int TS   [L] = '{4, 8, 9, 6, 2, 3, 1, 5, 7};
  localparam int SKEW [L] = '{1, 0, 0, 1, 1, 1, 2, 1, 1};
  localparam int ROFF [L] = '{4, 0, 0, 8, 4, 4, 12, 8, 8};
  localparam int SHARED [L] = '{0, 1, 1, 1, 1, 1, 1, 0, 0};  // register shared with another line

  logic clk = 0, rst_n = 0, go = 0;
  logic hc_we = 0, hc_cnt_mode = 0, hc_cnt_clr = 0;
  logic [3:0] hc_addr = '0;
  logic [W-1:0] hc_wdata = '0;
  logic [3:0] hc_ld_cnt;
  logic hr_we = 0, hr_commit = 0, hr_ready;
  logic [3:0] hr_waddr = '0;
  logic [HW-1:0] hr_wmask = '0;
  logic [HW-1:0][W-1:0] hr_wdata = '0;
  logic [0:0] hr_wr_slot;
  logic [0:0] si_valid = '0, si_ready, so_valid, so_ready = '0;
  logic [0:0][W-1:0] si_data = '0, so_data, arr_sin, arr_sout;
  logic [0:0][4:0] si_level, so_level;
  logic [L-1:0][W-1:0] arr_rand;
  logic [NC-1:0][W-1:0] arr_const;
  logic [NY-1:0][W-1:0] arr_cyc;
  logic arr_en, arr_period_end, stall;
  logic [3:0] arr_step;

  array_interface dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0, T = 0;
  int n_stall_frame = 0, n_stall_sin = 0, n_stall_sout = 0, n_host_wait = 0;
  int n_latch = 0, n_shared = 0, n_cyc_wrap = 0, n_cnt_load = 0, n_rand = 0;
  int fast_cyc = 0, fast_en = 0, n_sink = 0;
  bit slow = 0, pause_sink = 0;
  int pause_at = 0;
  bit sensor_paused = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d, array step %0d)", what, cyc, T);
    end
  endtask
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  function automatic logic [W-1:0] rword(int n, int l);
    return W'(n * 91 + l * 7 + 3) ^ 16'h3c00;
  endfunction
  function automatic logic [W-1:0] sword(int n);
    return W'(n * 13 + 1000);
  endfunction
  function automatic logic [W-1:0] oword(int n);
    return W'(n * 29 + 7) ^ 16'h0f0f;
  endfunction

  logic [W-1:0] cv [NC];
  logic [W-1:0] fv [NY][D];

  // host
  initial begin : host
    int slot, n;
    logic [W-1:0] img [P];
    repeat (3) tick();
    rst_n = 1;
    // constants and cyclic sequences by address (placeholder values) ...
    for (int i = 0; i < NC + NY * D; i++) begin
      hc_we = 1; hc_addr = 4'(i < NC ? i : NC + (i - NC) % NY); hc_wdata = W'($urandom);
      tick();
    end
    hc_we = 0;
    // ... then the real values through the counter-mode channel
    hc_cnt_mode = 1; hc_cnt_clr = 1; tick(); hc_cnt_clr = 0;
    for (int i = 0; i < NC; i++) begin
      cv[i] = W'($urandom); hc_we = 1; hc_wdata = cv[i]; tick(); n_cnt_load++;
    end
    for (int y = 0; y < NY; y++)
      for (int k = 0; k < D; k++) begin
        fv[y][k] = W'($urandom); hc_we = 1; hc_wdata = fv[y][k]; tick(); n_cnt_load++;
      end
    hc_we = 0;
    check(hc_ld_cnt == 0, "counter-mode sequence complete");
    // random-input frames
    for (int h = 0; h < NITER + 3; h++) begin
      if (h == NFAST + 2) slow = 1;
      if (!hr_ready) n_host_wait++;
      while (!hr_ready) tick();
      slot = int'(hr_wr_slot);
      for (int r = 0; r < P; r++) img[r] = '0;
      for (int l = 0; l < L; l++) begin
        n = h - SKEW[l];
        img[TS[l]] = rword(n, l);
      end
      for (int a = 0; a < P / HW; a++) begin
        hr_we = 1;
        hr_waddr = 4'((slot * P + a * HW) / HW);
        hr_wmask = '1;
        for (int q = 0; q < HW; q++) hr_wdata[q] = img[a * HW + q];
        tick();
      end
      hr_we = 0;
      hr_commit = 1; tick(); hr_commit = 0;
      if (h == 1) go = 1;
      if (slow && h < 30) repeat ($urandom_range(0, 14)) tick();
    end
  end

  // sensor: stops for 300 clocks in array period 12
  initial begin : sensor
    int k = 0;
    bit rdy;
    @(posedge rst_n);
    while (k < NITER + 20) begin
      si_valid[0] = 1; si_data[0] = sword(k);
      #0 rdy = si_ready[0];
      tick();
      if (rdy) k++;
      si_valid[0] = 0;
      if (T / P == 12 && !sensor_paused) begin
        sensor_paused = 1;
        repeat (300) tick();
      end
    end
    si_valid[0] = 0;
  end

  // sink: pauses for a long time, then drains
  always @(posedge clk) begin
    if (T / P == 30 && pause_at == 0) pause_at <= cyc;
    pause_sink <= (pause_at != 0 && cyc < pause_at + 260);
    so_ready[0] <= !pause_sink && ($urandom_range(0, 1) == 1);
    if (so_ready[0] && so_valid[0]) begin
      check(so_data[0] == oword(n_sink), $sformatf("stream output word %0d", n_sink));
      n_sink <= n_sink + 1;
    end
  end

  assign arr_sout[0] = oword(T / P);

  // array model
  always @(posedge clk) begin
    automatic int n = T / P;
    cyc <= cyc + 1;
    if (stall) begin
      if (si_level[0] == 0) n_stall_sin <= n_stall_sin + 1;
      else if (so_level[0] == 5'd16) n_stall_sout <= n_stall_sout + 1;
      else n_stall_frame <= n_stall_frame + 1;
    end
    if (arr_en) begin
      check(int'(arr_step) == T % P, "array step");
      for (int i = 0; i < NC; i++) check(arr_const[i] == cv[i], "constant input");
      for (int y = 0; y < NY; y++)
        check(arr_cyc[y] == fv[y][n % D], $sformatf("cyclic input %0d period %0d", y, n));
      if (T % P == 0 && n >= D) n_cyc_wrap <= n_cyc_wrap + 1;
      check(arr_sin[0] == sword(n), $sformatf("stream input period %0d", n));
      for (int l = 0; l < L; l++)
        if (T >= ROFF[l] && (T - ROFF[l]) % P == 0 && (T - ROFF[l]) / P < NITER) begin
          check(arr_rand[l] == rword((T - ROFF[l]) / P, l),
                $sformatf("random input %0d iteration %0d", l, (T - ROFF[l]) / P));
          n_rand++;
          if (l == 0) n_latch++;
          if (SHARED[l]) n_shared++;
        end
      T <= T + 1;
    end
    if (T > 0 && T < NFAST * P) begin
      fast_cyc <= fast_cyc + 1;
      if (arr_en) fast_en <= fast_en + 1;
    end
  end

  initial begin : finish
    wait (T >= (NITER - 1) * P + 13);
    wait (n_sink >= NITER);
    repeat (2) tick();
    check(n_rand == NITER * L, $sformatf("all random words seen (%0d)", n_rand));
    check(fast_en == fast_cyc, "phase 1 runs one array step per clock");
    check(n_stall_frame > 0, "stall for a missing frame happened");
    check(n_stall_sin > 0, "stall for an empty stream input happened");
    check(n_stall_sout > 0, "stall for a full stream output happened");
    check(n_host_wait > 0, "host held off by a full DPRAM");
    check(n_latch > 0, "reads straight from the DPRAM latch");
    check(n_shared > 0, "reads from shared buffer registers");
    check(n_cyc_wrap > 0, "cyclic FIFOs wrapped around");
    check(n_cnt_load > 0, "counter-mode loading");
    $display("stall: frame=%0d stream_in=%0d stream_out=%0d  host_wait=%0d latch=%0d shared=%0d cyc_wrap=%0d cnt_load=%0d cycles=%0d steps=%0d",
             n_stall_frame, n_stall_sin, n_stall_sout, n_host_wait, n_latch, n_shared,
             n_cyc_wrap, n_cnt_load, cyc, T);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
