// tb_rand_in_buffers: self-checking testbench of the shared buffer
// registers for the worked example (P = 10, three BPEs, inputs read at
// 4, 0, 0, BPEs starting at 0, 4, 8). By hand: line 0 (input A of p0) is
// wired to DPRAM lane 0; lines 1 and 4 share register 0, lines 2, 3, 5 and
// 6 share register 1, line 7 has register 2 and line 8 register 3. Random
// load strobes and bus words are applied and every output is compared with
// a model of that wiring.
module tb_rand_in_buffers;
  localparam int W = 16, L = 9;
  localparam int REGOF [L] = '{-1, 0, 1, 1, 0, 1, 1, 2, 3};

  logic clk = 0, rst_n = 0;
  logic [0:0][W-1:0] dp_rdata = '0;
  logic [3:0] buf_we = '0;
  logic [3:0][0:0] buf_sel = '0;
  logic [L-1:0][W-1:0] arr_in;

  rand_in_buffers #(.W(W), .P(10), .B(3), .K(3), .OMEGA({8'd0, 8'd0, 8'd4}),
                    .TAU({8'd8, 8'd4, 8'd0})) dut (.*);

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

  logic [W-1:0] mr [4];

  initial begin
    tick();
    rst_n = 1;
    for (int r = 0; r < 4; r++) mr[r] = '0;
    for (int it = 0; it < 300; it++) begin
      dp_rdata[0] = W'($urandom);
      buf_we = 4'($urandom);
      #1;
      check(arr_in[0] == dp_rdata[0], "line 0 follows the DPRAM latch");
      tick();
      for (int r = 0; r < 4; r++) if (buf_we[r]) mr[r] = dp_rdata[0];
      for (int l = 1; l < L; l++)
        check(arr_in[l] == mr[REGOF[l]], $sformatf("line %0d", l));
    end
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
