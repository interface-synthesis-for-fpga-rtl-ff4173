// tb_stream_fifo: self-checking testbench of the stream FIFO (16 words).
// Random pushes and pops, only where legal, against a queue model; the
// FIFO is driven full and empty several times, and push with pop while
// full is exercised.
module tb_stream_fifo;
  localparam int W = 16, D = 16;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [4:0] count;
  stream_fifo #(.W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_both_full = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  logic [W-1:0] q [$];

  initial begin
    int bias;
    tick();
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      bias = (it / 100) % 2 ? 3 : 1;      // phases that fill and drain
      check(count == 5'(q.size()), "count");
      check(empty == (q.size() == 0) && full == (q.size() == D), "flags");
      if (q.size() > 0) check(dout == q[0], "head word");
      if (full) n_full++;
      if (empty) n_empty++;
      pop  = !empty && ($urandom_range(0, 3) < 4 - bias);
      push = ($urandom_range(0, 3) < bias) && (!full || pop);
      if (push && pop && full) n_both_full++;
      din = W'($urandom);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      tick();
    end
    push = 0; pop = 0;
    check(n_full > 0 && n_empty > 0, "full and empty reached");
    $display("full=%0d empty=%0d push+pop-while-full=%0d", n_full, n_empty, n_both_full);
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
