// lms_dlms_ip - fixed-point LMS / delayed-LMS adaptive FIR filter IP.
//
// Estimates the reference y(n) from the last N input samples with an
// adaptive weight vector w_n (the coefficients h_i):
//   yhat(n) = w_n^t x_n,  e(n) = y(n) - yhat(n),
//   w_{n+1} = w_n + mu * x_{n-D} * e(n-D)  (D = 0: LMS, D > 0: DLMS).
// The processing unit follows the document's generic architecture: K
// multipliers, a pipelined adder tree (M_ADD stages) and an accumulator
// form the filter part over P = ceil(N/K) cycles; a subtracter forms the
// error; K multiply-add units update K coefficients per cycle. An FSM
// (lms_ctrl) sequences it. Every datum has its own word length and binary
// point (b_x, b_m, b_h, b_o and their fractional bits), so the IP can be
// generated for any fixed-point specification.
//
// Interface: a sample (x_in, y_in) is taken when x_valid and x_ready are
// both high. yhat_valid pulses when yhat holds w_n^t x_n; err and
// err_valid follow one cycle later. coef_addr/coef_data read any weight.
// Timing (cycles, sample to sample): LMS  2P + M_ADD + 3,
//                                    DLMS  P + M_ADD + 2.
// Default sizes: N = 128 taps (the document's experiment), K = 4 (the
// smallest parallelism it reports), 16-bit inputs and coefficients, 32-bit
// products and sums (its 16x16->32 reference). The binary points, the step
// mu = 2^-6, L_ADD = 1, the handshake and the rounding of the weight
// increment (every other cast truncates) are this design's choices.
module lms_dlms_ip
  import fxp_pkg::*;
#(
  parameter int unsigned N        = 128,
  parameter int unsigned K        = 4,
  parameter int unsigned BX       = 16, parameter int FX = 15,
  parameter int unsigned BH       = 16, parameter int FH = 15,
  parameter int unsigned BM       = 32, parameter int FM = 30,
  parameter int unsigned BO       = 32, parameter int FO = 24,
  parameter int unsigned L_ADD    = 1,
  parameter int unsigned MU_SHIFT = 6,
  parameter int unsigned DELAY    = 0,
  localparam int unsigned P  = (N + K - 1) / K,
  localparam int unsigned GW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic signed [BX-1:0] x_in,
  input  logic signed [BO-1:0] y_in,
  output logic                 yhat_valid,
  output logic signed [BO-1:0] yhat,
  output logic                 err_valid,
  output logic signed [BO-1:0] err,
  input  logic [AW-1:0]        coef_addr,
  output logic signed [BH-1:0] coef_data
);
  logic                 push;
  logic                 f_issue, f_first, f_last, a_issue;
  logic [GW-1:0]        f_grp, a_grp, h_grp, wr_grp;
  logic signed [BX-1:0] xf [K], xa [K];
  logic signed [BH-1:0] hf [K], ha [K], hw [K];
  logic signed [BM-1:0] prod [K];
  logic signed [BO-1:0] tsum, e_adapt, y_q;
  logic                 wr_en;
  grp_tag_t             tag0, tag1, tag2;

  lms_ctrl #(.P(P), .DELAY(DELAY)) u_ctrl (
    .clk, .rst_n, .x_valid, .x_ready, .push, .yhat_valid,
    .f_issue, .f_grp, .f_first, .f_last, .a_issue, .a_grp
  );

  // Reference sample of the sample being filtered.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    y_q <= '0;
    else if (push) y_q <= y_in;
  end

  lms_data_mem #(.N(N), .K(K), .BX(BX), .A_OFS(DELAY)) u_xmem (
    .clk, .rst_n, .wr_en(push), .wr_data(x_in),
    .f_grp, .f_data(xf), .a_grp, .a_data(xa)
  );

  lms_coef_mem #(.N(N), .K(K), .BH(BH)) u_hmem (
    .clk, .rst_n, .f_grp, .f_data(hf), .a_grp(h_grp), .a_data(ha),
    .wr_en, .wr_grp, .wr_data(hw), .dbg_addr(coef_addr), .dbg_data(coef_data)
  );

  assign tag0 = '{valid: f_issue, first: f_first, last: f_last};

  lms_filter_mult #(.K(K), .BX(BX), .FX(FX), .BH(BH), .FH(FH), .BM(BM), .FM(FM)) u_mult (
    .clk, .rst_n, .x(xf), .h(hf), .tag_in(tag0), .m(prod), .tag_out(tag1)
  );

  lms_adder_tree #(.K(K), .BM(BM), .FM(FM), .BO(BO), .FO(FO), .L_ADD(L_ADD)) u_tree (
    .clk, .rst_n, .d(prod), .tag_in(tag1), .sum(tsum), .tag_out(tag2)
  );

  lms_accumulator #(.BO(BO)) u_acc (
    .clk, .rst_n, .s(tsum), .tag_in(tag2), .y(yhat), .y_valid(yhat_valid)
  );

  lms_error #(.BO(BO), .DELAY(DELAY)) u_err (
    .clk, .rst_n, .yhat_valid, .yhat, .y(y_q),
    .e(err), .e_valid(err_valid), .e_adapt
  );

  lms_adapt_mad #(.N(N), .K(K), .BX(BX), .FX(FX), .BH(BH), .FH(FH), .BO(BO), .FO(FO),
                  .MU_SHIFT(MU_SHIFT)) u_adapt (
    .clk, .rst_n, .issue(a_issue), .grp(a_grp), .x(xa), .e(e_adapt),
    .h_grp, .h_in(ha), .wr_en, .wr_grp, .wr_data(hw)
  );
endmodule
