// rand_in_if: DPRAM based interface for the random-type inputs of a
// processor array (host -> DPRAM -> shared buffer registers -> BPEs).
//
// The host writes words through a HW-word wide port into a dual-port RAM of
// NF frames. A frame has P rows of b words, one row per time step of the
// iteration period, where b = ceil(K*B/P) is the minimum read width. The
// array side reads one row per step; rand_in_ctrl generates the read
// addresses and the buffer load strobes, and rand_in_buffers routes the
// words to the K*B BPE inputs arr_in[i*K+j] (input a_j of BPE p_i).
//
// Where the host puts a word: the word that BPE input l reads in its
// iteration n (n = 0,1,.. counted from the first step with arr_en high)
// goes into frame n + skew(l), row ts(l), lane lane(l), i.e. DPRAM word
//   ((n + skew(l)) mod NF) * P*b + ts(l)*b + lane(l),
// host address = word / HW, mask bit = word mod HW. skew, ts and lane come
// from ifs_pkg::compute_schedule(); for the default parameters they are
// listed in README.md. Frames are filled in order: write the frame named by
// h_wr_slot while h_ready is high, then pulse h_commit.
//
// Timing: the BPE of line l reads its iteration-n word in array step
// n*P + TAU[l/K] + OMEGA[l%K] (array steps count clocks with arr_en high).
// Everything holds while arr_en is low (see rand_in_ctrl for the stall).
// The RAM/buffer structure follows the described interface; the frame
// layout, the handshake and the host address mapping are this design's.
module rand_in_if #(
  parameter int W         = 16,
  parameter int HW        = 2,
  parameter int P         = 10,
  parameter int B         = 3,
  parameter int K         = 3,
  parameter logic [K-1:0][7:0] OMEGA = {8'd0, 8'd0, 8'd4},
  parameter logic [B-1:0][7:0] TAU   = {8'd8, 8'd4, 8'd0},
  parameter int NF        = 2,
  localparam int L    = K * B,
  localparam int TW   = (P > 1) ? $clog2(P) : 1,
  localparam int SW   = (NF > 1) ? $clog2(NF) : 1,
  localparam ifs_pkg::sched_t S =
    ifs_pkg::compute_schedule(P, B, K, ifs_pkg::omega_vec_t'(OMEGA), ifs_pkg::tau_vec_t'(TAU)),
  localparam int BW   = int'(S.b),
  localparam int NREG = (S.nregs > 0) ? int'(S.nregs) : 1,
  localparam int LW   = (BW > 1) ? $clog2(BW) : 1,
  localparam int DEPTH = NF * P * BW,
  localparam int HAW   = (DEPTH / HW > 1) ? $clog2(DEPTH / HW) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    go,
  input  logic                    ext_ok,
  // host port
  input  logic                    h_we,
  input  logic [HAW-1:0]        h_waddr,
  input  logic [HW-1:0]           h_wmask,
  input  logic [HW-1:0][W-1:0]    h_wdata,
  input  logic                    h_commit,
  output logic                    h_ready,
  output logic [SW-1:0]           h_wr_slot,
  // array side
  output logic [L-1:0][W-1:0]     arr_in,
  output logic                    arr_en,
  output logic [TW-1:0]           step,
  output logic                    period_start,
  output logic                    period_end,
  output logic                    stall
);



  localparam int RAW   = (NF * P > 1) ? $clog2(NF * P) : 1;

  logic                     dp_re;
  logic [RAW-1:0]           dp_raddr;
  logic [BW-1:0][W-1:0]     dp_rdata;
  logic [NREG-1:0]          buf_we;
  logic [NREG-1:0][LW-1:0]  buf_sel;

  dpram #(.W(W), .WR_WORDS(HW), .RD_WORDS(BW), .DEPTH(DEPTH)) u_dpram (
    .clk   (clk),
    .we    (h_we),
    .waddr (h_waddr),
    .wmask (h_wmask),
    .wdata (h_wdata),
    .re    (dp_re),
    .raddr (dp_raddr),
    .rdata (dp_rdata)
  );

  rand_in_ctrl #(.P(P), .B(B), .K(K), .OMEGA(OMEGA), .TAU(TAU), .NF(NF)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .go         (go),
    .ext_ok     (ext_ok),
    .h_commit   (h_commit),
    .h_ready    (h_ready),
    .h_wr_slot  (h_wr_slot),
    .dp_re      (dp_re),
    .dp_raddr   (dp_raddr),
    .buf_we     (buf_we),
    .buf_sel    (buf_sel),
    .arr_en     (arr_en),
    .step       (step),
    .period_start (period_start),
    .period_end (period_end),
    .stall      (stall)
  );

  rand_in_buffers #(.W(W), .P(P), .B(B), .K(K), .OMEGA(OMEGA), .TAU(TAU)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .dp_rdata (dp_rdata),
    .buf_we   (buf_we),
    .buf_sel  (buf_sel),
    .arr_in   (arr_in)
  );

  initial
    assert (DEPTH % HW == 0) else $error("rand_in_if: NF*P*b must be a multiple of HW");

endmodule
