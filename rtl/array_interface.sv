// array_interface: complete host/sensor interface of an FPGA based
// processor array, with one structure per kind of array port.
//
//   constant + cyclic inputs  const_cyc_if: registers and feedback FIFOs,
//                             loaded by the host before the computation
//   random inputs             rand_in_if: DPRAM with a narrow, scheduled
//                             array-side port and shared buffer registers
//   stream inputs / outputs   stream_fifo: one FIFO per stream port,
//                             between the array and its source or sink
//
// rand_in_if owns the time base: arr_step is the time step within the
// iteration period of BPE p0 and arr_en is the array's clock enable. Once
// per iteration period (arr_period_end) the cyclic FIFOs rotate and each
// stream output FIFO takes the word on arr_sout; at each period start every
// stream input FIFO hands its next word to the arr_sin register, which
// holds it for the whole period. The array is held at a period boundary
// when the next DPRAM frame is not committed, a stream input FIFO is empty
// or a stream output FIFO is full (stall).
//
// The processor array itself, the host and the sensors are outside: their
// connections are the ports. The per-port structures follow the described
// architecture; the one-word-per-period stream timing, the shared time base
// and the stall are this design's choices.
module array_interface #(
  parameter int W          = 16,
  // random inputs
  parameter int HW         = 2,
  parameter int P          = 10,
  parameter int B          = 3,
  parameter int K          = 3,
  parameter logic [K-1:0][7:0] OMEGA = {8'd0, 8'd0, 8'd4},
  parameter logic [B-1:0][7:0] TAU   = {8'd8, 8'd4, 8'd0},
  parameter int NF         = 2,
  // constant and cyclic inputs
  parameter int NC         = 2,
  parameter int NY         = 2,
  parameter int CYC_DEPTH  = 5,
  parameter int CAW        = 4,
  // stream ports
  parameter int NSI        = 1,
  parameter int NSO        = 1,
  parameter int S_DEPTH    = 16,
  localparam int L    = K * B,
  localparam int TW   = (P > 1) ? $clog2(P) : 1,
  localparam int SW   = (NF > 1) ? $clog2(NF) : 1,
  localparam int NW   = NC + NY * CYC_DEPTH,
  localparam int CW   = (NW > 1) ? $clog2(NW) : 1,
  localparam ifs_pkg::sched_t S =
    ifs_pkg::compute_schedule(P, B, K, ifs_pkg::omega_vec_t'(OMEGA), ifs_pkg::tau_vec_t'(TAU)),
  localparam int BW   = int'(S.b),
  localparam int DEPTH = NF * P * BW,
  localparam int HAW   = (DEPTH / HW > 1) ? $clog2(DEPTH / HW) : 1,
  localparam int SAW   = (S_DEPTH > 1) ? $clog2(S_DEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   go,
  // host: constant/cyclic load bus
  input  logic                   hc_we,
  input  logic [CAW-1:0]         hc_addr,
  input  logic [W-1:0]           hc_wdata,
  input  logic                   hc_cnt_mode,
  input  logic                   hc_cnt_clr,
  output logic [CW-1:0]          hc_ld_cnt,
  // host: random-input DPRAM port
  input  logic                   hr_we,
  input  logic [HAW-1:0]       hr_waddr,
  input  logic [HW-1:0]          hr_wmask,
  input  logic [HW-1:0][W-1:0]   hr_wdata,
  input  logic                   hr_commit,
  output logic                   hr_ready,
  output logic [SW-1:0]          hr_wr_slot,
  // stream sources and sinks
  input  logic [NSI-1:0]         si_valid,
  input  logic [NSI-1:0][W-1:0]  si_data,
  output logic [NSI-1:0]         si_ready,
  output logic [NSI-1:0][SAW:0]  si_level,
  output logic [NSO-1:0]         so_valid,
  output logic [NSO-1:0][W-1:0]  so_data,
  input  logic [NSO-1:0]         so_ready,
  output logic [NSO-1:0][SAW:0]  so_level,
  // processor array
  output logic [L-1:0][W-1:0]    arr_rand,
  output logic [NC-1:0][W-1:0]   arr_const,
  output logic [NY-1:0][W-1:0]   arr_cyc,
  output logic [NSI-1:0][W-1:0]  arr_sin,
  input  logic [NSO-1:0][W-1:0]  arr_sout,
  output logic                   arr_en,
  output logic [TW-1:0]          arr_step,
  output logic                   arr_period_end,
  output logic                   stall
);



  logic                  period_start, ext_ok;
  logic [NSI-1:0]        si_empty, si_full;
  logic [NSO-1:0]        so_empty, so_full;
  logic [NSI-1:0][W-1:0] si_head;

  assign ext_ok = !(|si_empty) && !(|so_full);

  rand_in_if #(.W(W), .HW(HW), .P(P), .B(B), .K(K), .OMEGA(OMEGA), .TAU(TAU), .NF(NF)) u_rand (
    .clk          (clk),
    .rst_n        (rst_n),
    .go           (go),
    .ext_ok       (ext_ok),
    .h_we         (hr_we),
    .h_waddr      (hr_waddr),
    .h_wmask      (hr_wmask),
    .h_wdata      (hr_wdata),
    .h_commit     (hr_commit),
    .h_ready      (hr_ready),
    .h_wr_slot    (hr_wr_slot),
    .arr_in       (arr_rand),
    .arr_en       (arr_en),
    .step         (arr_step),
    .period_start (period_start),
    .period_end   (arr_period_end),
    .stall        (stall)
  );

  const_cyc_if #(.W(W), .NC(NC), .NY(NY), .DEPTH(CYC_DEPTH), .AW(CAW)) u_cc (
    .clk       (clk),
    .rst_n     (rst_n),
    .h_we      (hc_we),
    .h_addr    (hc_addr),
    .h_wdata   (hc_wdata),
    .cnt_mode  (hc_cnt_mode),
    .cnt_clr   (hc_cnt_clr),
    .rot       (arr_period_end),
    .const_out (arr_const),
    .cyc_out   (arr_cyc),
    .ld_cnt    (hc_ld_cnt)
  );

  for (genvar i = 0; i < NSI; i++) begin : g_si
    stream_fifo #(.W(W), .DEPTH(S_DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (si_valid[i] && si_ready[i]),
      .din   (si_data[i]),
      .pop   (period_start),
      .dout  (si_head[i]),
      .empty (si_empty[i]),
      .full  (si_full[i]),
      .count (si_level[i])
    );
    assign si_ready[i] = !si_full[i];

    always_ff @(posedge clk) begin
      if (!rst_n) arr_sin[i] <= '0;
      else if (period_start) arr_sin[i] <= si_head[i];
    end
  end

  for (genvar i = 0; i < NSO; i++) begin : g_so
    stream_fifo #(.W(W), .DEPTH(S_DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (arr_period_end),
      .din   (arr_sout[i]),
      .pop   (so_ready[i] && !so_empty[i]),
      .dout  (so_data[i]),
      .empty (so_empty[i]),
      .full  (so_full[i]),
      .count (so_level[i])
    );
    assign so_valid[i] = !so_empty[i];
  end

endmodule
