// tb_cyc_fifo: self-checking testbench of the feedback FIFO. Loads five
// words, checks that the first word loaded appears first, that rotation
// replays the sequence cyclically several times, that the output holds
// without ld/rot, and that a reload replaces the sequence.
module tb_cyc_fifo;
  localparam int W = 16, D = 5;
  logic clk = 0, rst_n = 0, ld = 0, rot = 0;
  logic [W-1:0] din = '0, dout;
  cyc_fifo #(.W(W), .DEPTH(D)) dut (.*);

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

  logic [W-1:0] seq [D];

  initial begin
    tick();
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < D; i++) begin
        seq[i] = W'($urandom);
        ld = 1; din = seq[i];
        tick();
      end
      ld = 0;
      check(dout == seq[0], "first word loaded is at the output");
      for (int r = 0; r < 4 * D; r++) begin
        if ($urandom_range(0, 2) == 0) begin
          tick();
          check(dout == seq[r % D], "holds without rot");
        end
        rot = 1; tick(); rot = 0;
        check(dout == seq[(r + 1) % D], $sformatf("rotation %0d", r));
      end
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
