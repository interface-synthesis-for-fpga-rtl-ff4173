// tb_const_cyc_if: self-checking testbench of the constant/cyclic input
// interface (2 constant registers, 2 cyclic FIFOs of 5 words). It loads
// everything once by address and once through the counter-mode channel,
// then rotates the FIFOs for three full cycles and checks that the
// constants hold and each FIFO output replays its own sequence.
module tb_const_cyc_if;
  localparam int W = 16, NC = 2, NY = 2, D = 5;
  logic clk = 0, rst_n = 0, h_we = 0, cnt_mode = 0, cnt_clr = 0, rot = 0;
  logic [3:0] h_addr = '0;
  logic [W-1:0] h_wdata = '0;
  logic [NC-1:0][W-1:0] const_out;
  logic [NY-1:0][W-1:0] cyc_out;
  logic [3:0] ld_cnt;
  const_cyc_if #(.W(W), .NC(NC), .NY(NY), .DEPTH(D), .AW(4)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic tick();
    @(posedge clk);
    #1;
  endtask
  task automatic wr(int a, logic [W-1:0] d);
    h_we = 1; h_addr = 4'(a); h_wdata = d;
    tick();
    h_we = 0;
  endtask

  logic [W-1:0] cv [NC];
  logic [W-1:0] fv [NY][D];

  task automatic run_check(string how);
    for (int i = 0; i < NC; i++) check(const_out[i] == cv[i], {how, ": constant"});
    for (int r = 0; r < 3 * D; r++) begin
      for (int y = 0; y < NY; y++)
        check(cyc_out[y] == fv[y][r % D], $sformatf("%s: FIFO %0d word %0d", how, y, r));
      rot = 1; tick(); rot = 0;
      for (int i = 0; i < NC; i++) check(const_out[i] == cv[i], {how, ": constant holds"});
    end
  endtask

  initial begin
    tick();
    rst_n = 1;
    // address mode, FIFO words interleaved
    for (int i = 0; i < NC; i++) begin cv[i] = W'($urandom); wr(i, cv[i]); end
    for (int k = 0; k < D; k++)
      for (int y = 0; y < NY; y++) begin fv[y][k] = W'($urandom); wr(NC + y, fv[y][k]); end
    run_check("address mode");
    // counter mode
    cnt_mode = 1;
    cnt_clr = 1; tick(); cnt_clr = 0;
    for (int i = 0; i < NC; i++) begin cv[i] = W'($urandom); wr(15, cv[i]); end
    for (int y = 0; y < NY; y++)
      for (int k = 0; k < D; k++) begin fv[y][k] = W'($urandom); wr(15, fv[y][k]); end
    check(ld_cnt == 0, "counter wrapped after the whole sequence");
    run_check("counter mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
