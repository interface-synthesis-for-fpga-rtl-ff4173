// const_cyc_if: interface for the constant-type and cyclic-type inputs of a
// processor array.
//
// Constant inputs (filter coefficients, say) sit in NC registers; cyclic
// inputs, whose value sequence is known before the computation, sit in NY
// feedback FIFOs of DEPTH words (cyc_fifo). Both are loaded from the host
// before the computation starts, one word per write, through the address
// decoder (cc_addr_decoder, address or counter mode). During the
// computation the registers hold and every FIFO rotates by one word on each
// rot pulse, which the top level gives once per iteration period.
//
// ld_cnt shows the position of the counter-mode load sequence.
//
// Timing: a word written in one clock is visible at the outputs the next.
// The structure follows the described register/FIFO/decoder arrangement;
// one word per write and a single shared rot are this design's choices.
module const_cyc_if #(
  parameter int W     = 16,
  parameter int NC    = 2,
  parameter int NY    = 2,
  parameter int DEPTH = 5,
  parameter int AW    = 4,
  localparam int NW   = NC + NY * DEPTH,
  localparam int CW   = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 h_we,
  input  logic [AW-1:0]        h_addr,
  input  logic [W-1:0]         h_wdata,
  input  logic                 cnt_mode,
  input  logic                 cnt_clr,
  input  logic                 rot,
  output logic [NC-1:0][W-1:0] const_out,
  output logic [NY-1:0][W-1:0] cyc_out,
  output logic [CW-1:0]        ld_cnt
);

  logic [NC-1:0] reg_ld;
  logic [NY-1:0] fifo_ld;

  cc_addr_decoder #(.NC(NC), .NY(NY), .DEPTH(DEPTH), .AW(AW)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .h_we     (h_we),
    .h_addr   (h_addr),
    .cnt_mode (cnt_mode),
    .cnt_clr  (cnt_clr),
    .reg_ld   (reg_ld),
    .fifo_ld  (fifo_ld),
    .cnt      (ld_cnt)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) const_out <= '0;
    else
      for (int i = 0; i < NC; i++)
        if (reg_ld[i]) const_out[i] <= h_wdata;
  end

  for (genvar i = 0; i < NY; i++) begin : g_fifo
    cyc_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .ld    (fifo_ld[i]),
      .din   (h_wdata),
      .rot   (rot),
      .dout  (cyc_out[i])
    );
  end

endmodule
