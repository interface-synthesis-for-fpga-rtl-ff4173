// tb_cc_addr_decoder: self-checking testbench of the constant/cyclic
// address decoder (2 registers, 2 FIFOs of 5 words). Address mode: every
// address 0..15 with and without write strobe. Counter mode: two full walks
// through the load sequence (R0, R1, 5 x F0, 5 x F1), writes without strobe
// in between, and a counter clear.
module tb_cc_addr_decoder;
  logic clk = 0, rst_n = 0, h_we = 0, cnt_mode = 0, cnt_clr = 0;
  logic [3:0] h_addr = '0;
  logic [1:0] reg_ld, fifo_ld;
  logic [3:0] cnt;
  cc_addr_decoder #(.NC(2), .NY(2), .DEPTH(5), .AW(4)) dut (.*);

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

  function automatic logic [3:0] exp_seq(int c);  // {fifo_ld, reg_ld}
    if (c < 2) return 4'(1 << c);
    if (c < 7) return 4'b0100;
    return 4'b1000;
  endfunction

  initial begin
    tick();
    rst_n = 1;
    for (int a = 0; a < 16; a++) begin
      h_addr = 4'(a);
      h_we = 0; #1;
      check({fifo_ld, reg_ld} == 4'b0, "no strobe without write");
      h_we = 1; #1;
      check({fifo_ld, reg_ld} == (a < 2 ? 4'(1 << a) : a < 4 ? 4'(1 << a) : 4'b0),
            $sformatf("address %0d", a));
      tick();
    end
    h_we = 0;
    check(cnt == 0, "counter idle in address mode");
    cnt_mode = 1;
    for (int c = 0; c < 24; c++) begin
      h_addr = 4'($urandom);
      h_we = 1; #1;
      check({fifo_ld, reg_ld} == exp_seq(c % 12), $sformatf("counter step %0d", c));
      tick();
      h_we = 0; tick();
      check(cnt == 4'((c + 1) % 12), "counter only advances on writes");
    end
    cnt_clr = 1; tick(); cnt_clr = 0;
    check(cnt == 0, "counter clear");
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
