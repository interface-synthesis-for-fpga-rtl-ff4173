// tb_dpram: self-checking testbench of the mixed-width dual-port RAM.
// Two instances: a 2-word write / 1-word read port (host wider than the
// array side) and a 1-word write / 4-word read port. Random masked writes
// and reads are compared with a plain word array kept by the testbench;
// the read latency of one clock and the holding of the latch while re is
// low are checked too.
module tb_dpram;
  localparam int W = 16;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // instance A: WR 2 words, RD 1 word, 20 words
  logic a_we = 0, a_re = 0;
  logic [3:0] a_waddr = '0;
  logic [1:0] a_wmask = '0;
  logic [1:0][W-1:0] a_wdata = '0;
  logic [4:0] a_raddr = '0;
  logic [0:0][W-1:0] a_rdata;
  dpram #(.W(W), .WR_WORDS(2), .RD_WORDS(1), .DEPTH(20)) ua (
    .clk(clk), .we(a_we), .waddr(a_waddr), .wmask(a_wmask), .wdata(a_wdata),
    .re(a_re), .raddr(a_raddr), .rdata(a_rdata));

  // instance B: WR 1 word, RD 4 words, 16 words
  logic b_we = 0, b_re = 0;
  logic [3:0] b_waddr = '0;
  logic [0:0] b_wmask = '0;
  logic [0:0][W-1:0] b_wdata = '0;
  logic [1:0] b_raddr = '0;
  logic [3:0][W-1:0] b_rdata;
  dpram #(.W(W), .WR_WORDS(1), .RD_WORDS(4), .DEPTH(16)) ub (
    .clk(clk), .we(b_we), .waddr(b_waddr), .wmask(b_wmask), .wdata(b_wdata),
    .re(b_re), .raddr(b_raddr), .rdata(b_rdata));

  logic [W-1:0] ma [20];
  logic [W-1:0] mb [16];

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  initial begin
    logic [W-1:0] hold;
    logic [3:0][W-1:0] holdb;
    // fill both memories completely
    for (int a = 0; a < 10; a++) begin
      a_we = 1; a_waddr = 4'(a); a_wmask = 2'b11;
      a_wdata[0] = W'($urandom); a_wdata[1] = W'($urandom);
      ma[2*a] = a_wdata[0]; ma[2*a+1] = a_wdata[1];
      tick();
    end
    a_we = 0;
    for (int a = 0; a < 16; a++) begin
      b_we = 1; b_waddr = 4'(a); b_wmask = 1'b1; b_wdata[0] = W'($urandom);
      mb[a] = b_wdata[0];
      tick();
    end
    b_we = 0;
    // random traffic
    for (int it = 0; it < 400; it++) begin
      int ra, rb, wa;
      ra = $urandom_range(0, 19);
      rb = $urandom_range(0, 3);
      a_re = ($urandom_range(0, 3) != 0);
      b_re = ($urandom_range(0, 3) != 0);
      a_raddr = 5'(ra); b_raddr = 2'(rb);
      a_we = $urandom_range(0, 1);
      wa = $urandom_range(0, 9);
      a_waddr = 4'(wa); a_wmask = 2'($urandom_range(0, 3));
      a_wdata[0] = W'($urandom); a_wdata[1] = W'($urandom);
      hold = a_re ? ma[ra] : a_rdata[0];          // read-before-write
      for (int q = 0; q < 4; q++) holdb[q] = b_re ? mb[4*rb+q] : b_rdata[q];
      if (a_we) for (int q = 0; q < 2; q++) if (a_wmask[q]) ma[2*wa+q] = a_wdata[q];
      tick();
      check(a_rdata[0] == hold, $sformatf("A read word %0d", ra));
      for (int q = 0; q < 4; q++)
        check(b_rdata[q] == holdb[q], $sformatf("B read row %0d lane %0d", rb, q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
