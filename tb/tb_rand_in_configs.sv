// tb_rand_in_configs: the random-input interface under several array
// shapes besides the default one, including read widths b = 2 and 3, a
// schedule where every input of every BPE is read in the same step, BPEs
// whose reads run into the next period, and three DPRAM frames. Each
// configuration runs in its own rand_in_harness, which checks every word
// at its read step and the schedule's own rules. The last one is the
// largest schedule the package holds (64 BPE inputs).
module tb_rand_in_configs;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 6;
  int  c [N];
  int  f [N];
  bit  d [N];

  // b = 3: nine inputs in a period of four
  rand_in_harness #(.HW(2), .P(4), .B(3), .K(3), .OMEGA({8'd3, 8'd1, 8'd0}),
                    .TAU({8'd2, 8'd1, 8'd0})) h0 (.clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  // b = 2, two inputs read together, BPEs spread unevenly
  rand_in_harness #(.HW(2), .P(7), .B(4), .K(2), .OMEGA({8'd2, 8'd2}),
                    .TAU({8'd6, 8'd5, 8'd3, 8'd0})) h1 (.clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  // b = 1, all fifteen reads start in the same step of each BPE
  rand_in_harness #(.HW(4), .P(16), .B(5), .K(3), .OMEGA({8'd0, 8'd0, 8'd0}),
                    .TAU({8'd4, 8'd3, 8'd2, 8'd1, 8'd0})) h2 (.clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));
  // reads that wrap into the next period, three frames, host port of 3 words
  rand_in_harness #(.HW(3), .P(5), .B(2), .K(2), .OMEGA({8'd4, 8'd4}),
                    .TAU({8'd4, 8'd0}), .NF(3)) h3 (.clk(clk), .checks(c[3]), .failures(f[3]), .done(d[3]));
  // the default example with three frames
  rand_in_harness #(.HW(2), .P(10), .B(3), .K(3), .OMEGA({8'd0, 8'd0, 8'd4}),
                    .TAU({8'd8, 8'd4, 8'd0}), .NF(3)) h4 (.clk(clk), .checks(c[4]), .failures(f[4]), .done(d[4]));
  // the largest schedule ifs_pkg holds: 16 BPEs x 4 inputs = 64 lines, P = 100
  rand_in_harness #(.HW(4), .P(100), .B(16), .K(4), .OMEGA({8'd90, 8'd50, 8'd0, 8'd0}),
                    .TAU({8'd75, 8'd70, 8'd65, 8'd60, 8'd55, 8'd50, 8'd45, 8'd40,
                          8'd35, 8'd30, 8'd25, 8'd20, 8'd15, 8'd10, 8'd5, 8'd0}))
    h5 (.clk(clk), .checks(c[5]), .failures(f[5]), .done(d[5]));

  initial begin
    int checks, failures;
    #20;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired: done = %b%b%b%b%b%b", d[0], d[1], d[2], d[3], d[4], d[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
