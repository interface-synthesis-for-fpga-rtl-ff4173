// tb_rand_in_ctrl: self-checking testbench of the random-input controller
// with the worked example (P = 10, three BPEs, inputs read at 4, 0, 0,
// BPEs starting at 0, 4, 8).
//
// Expected, worked out by hand: four shared registers, loaded in steps
//   reg 0: 2, 8    reg 1: 1, 3, 6, 9    reg 2: 5    reg 3: 7
// (none in steps 0 and 4: step 4 is served by the DPRAM latch itself), all
// from lane 0, and the DPRAM row frame*10 + next step. Also checked: the
// prologue frame with arr_en low, the stall at the period boundary without
// a committed frame or without ext_ok, the frame handshake and the
// period_start / period_end strobes.
module tb_rand_in_ctrl;
  localparam int P = 10, NF = 2;

  logic clk = 0, rst_n = 0, go = 0, ext_ok = 1, h_commit = 0;
  logic h_ready, dp_re, arr_en, period_start, period_end, stall;
  logic [0:0] h_wr_slot;
  logic [4:0] dp_raddr;
  logic [3:0] buf_we;
  logic [3:0][0:0] buf_sel;
  logic [3:0] step;

  rand_in_ctrl #(.P(P), .B(3), .K(3), .OMEGA({8'd0, 8'd0, 8'd4}),
                 .TAU({8'd8, 8'd4, 8'd0}), .NF(NF)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (step %0d)", what, step); end
  endtask
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  function automatic logic [3:0] exp_we(int t);
    case (t)
      1, 3, 6, 9: return 4'b0010;
      2, 8:       return 4'b0001;
      5:          return 4'b0100;
      7:          return 4'b1000;
      default:    return 4'b0000;
    endcase
  endfunction

  int frame_cnt = 0;   // frames started (the first one is the prologue)
  int n_stall_frame = 0, n_stall_ext = 0;

  initial begin
    int f, en_cycles;
    repeat (2) tick();
    rst_n = 1;
    check(h_ready && h_wr_slot == 0, "ready after reset");
    // commit two frames, then no frame is free
    h_commit = 1; tick(); h_commit = 0;
    check(h_wr_slot == 1, "write slot advances");
    h_commit = 1; tick(); h_commit = 0;
    check(!h_ready, "no free frame after NF commits");
    // go: prologue period reads frame 0 with the array held
    go = 1;
    #0;
    check(stall == 0 && dp_re, "start without stall");
    check(dp_raddr == 0, "first read is frame 0 row 0");
    check(period_start == 0, "prologue start is no array period start");
    f = 0;
    tick();
    for (int t = 0; t < P; t++) begin
      check(step == 4'(t), "step count");
      check(!arr_en, "array held in prologue");
      check(buf_we == exp_we(t), $sformatf("prologue load strobes step %0d", t));
      if (t < P - 1) check(dp_raddr == 5'(t + 1), "prologue read row");
      else check(dp_raddr == 5'(P), "read of frame 1 row 0");
      if (t < P - 1) tick();
    end
    check(period_start && !period_end, "first array period starts");
    tick();
    check(h_ready, "frame 0 released");
    // array period 0 on frame 1; frame 2 (slot 0) not committed yet
    for (int t = 0; t < P; t++) begin
      check(step == 4'(t), "array step");
      if (t < P - 1) check(arr_en, "array running");
      if (t < P - 1) check(buf_we == exp_we(t), $sformatf("load strobes step %0d", t));
      check(buf_sel == '0, "lane select");
      if (t < P - 1) begin
        check(dp_raddr == 5'(P + t + 1), "read row of frame 1");
        tick();
      end
    end
    // at step P-1 without a committed frame: stall
    for (int s = 0; s < 3; s++) begin
      check(stall && !arr_en && !dp_re && buf_we == '0, "stall without frame");
      n_stall_frame++;
      tick();
    end
    check(step == 4'(P - 1), "held at last step");
    // frame arrives but ext_ok is low: still stalled
    h_commit = 1; ext_ok = 0; tick(); h_commit = 0;
    check(stall && !arr_en, "stall on ext_ok");
    n_stall_ext++;
    tick();
    check(stall, "stall on ext_ok again");
    ext_ok = 1;
    #0;
    check(!stall && arr_en && period_end && period_start, "boundary after stall");
    check(dp_raddr == 5'(0), "read of frame 2 (slot 0) row 0");
    check(buf_we == exp_we(P - 1), "load strobes of step 9 after the stall");
    tick();
    check(step == 0 && arr_en, "next period runs");
    // go low freezes everything
    go = 0; #0;
    check(!arr_en && !dp_re && buf_we == '0, "go low holds");
    tick();
    check(step == 0, "held by go");
    go = 1;
    check(n_stall_frame > 0 && n_stall_ext > 0, "both stall causes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
