// cc_addr_decoder: address decoder of the constant/cyclic input interface.
//
// Turns a host write into one load strobe: reg_ld[i] for constant register
// i or fifo_ld[i] for cyclic FIFO i.
//   - Address mode (cnt_mode = 0), registers and FIFOs mapped into the host
//     address space: address i < NC loads register i, address NC+i pushes a
//     word into FIFO i; other addresses load nothing.
//   - Counter mode (cnt_mode = 1), the interface hangs on an output channel
//     of the host: the address is ignored and an internal counter names the
//     target. It walks through register 0..NC-1, then DEPTH words for FIFO
//     0, DEPTH words for FIFO 1, and so on, advancing on every write and
//     wrapping after the last FIFO word. cnt_clr restarts it.
// The strobes are combinational in h_we; the counter advances on the clock.
// Both modes follow the described decoder; the address map and the order
// the counter walks in are this design's choices.
module cc_addr_decoder #(
  parameter int NC    = 2,
  parameter int NY    = 2,
  parameter int DEPTH = 5,
  parameter int AW    = 4,
  localparam int NW   = NC + NY * DEPTH,
  localparam int CW   = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  logic          cnt_mode,
  input  logic          cnt_clr,
  output logic [NC-1:0] reg_ld,
  output logic [NY-1:0] fifo_ld,
  output logic [CW-1:0] cnt
);

  always_ff @(posedge clk) begin
    if (!rst_n || cnt_clr) cnt <= '0;
    else if (h_we && cnt_mode) cnt <= (cnt == CW'(NW - 1)) ? '0 : cnt + 1'b1;
  end

  always_comb begin
    reg_ld  = '0;
    fifo_ld = '0;
    if (h_we) begin
      if (cnt_mode) begin
        if (int'(cnt) < NC) reg_ld[int'(cnt)] = 1'b1;
        else fifo_ld[(int'(cnt) - NC) / DEPTH] = 1'b1;
      end else begin
        if (int'(h_addr) < NC) reg_ld[int'(h_addr)] = 1'b1;
        else if (int'(h_addr) < NC + NY) fifo_ld[int'(h_addr) - NC] = 1'b1;
      end
    end
  end

endmodule
