// lms_adapt_mad - adaptation part of the LMS/DLMS IP: K multiply-add units.
//
// For one group of K taps it computes h_i(n+1) = h_i(n) + mu * x_i * e in
// two pipeline stages, as in the document's generic architecture:
//   stage 1 (issue cycle): K multipliers form x(n-i) * e; the adaptation
//     step mu = 2^-MU_SHIFT is applied as a shift and the product is
//     rounded to nearest in the coefficient format (BH bits, FH
//     fractional) and registered;
//   stage 2 (next cycle): the registered group index addresses the
//     coefficient memory (h_grp / h_in), K adders add the increment and the
//     result is handed to the memory write port (wr_*), which stores it at
//     the end of that cycle.
// A power-of-two step and the single quantization of the update term are
// this design's choices; the document leaves the step size to the user.
// The update is rounded rather than truncated: a floor cast adds a bias of
// -1/2 LSB to every weight at every sample, and the weights drift far
// enough to cost some 40 dB of output SQNR at the default formats.
module lms_adapt_mad
  import fxp_pkg::*;
#(
  parameter int unsigned N  = 128,
  parameter int unsigned K  = 4,
  parameter int unsigned BX = 16, parameter int FX = 15,
  parameter int unsigned BH = 16, parameter int FH = 15,
  parameter int unsigned BO = 32, parameter int FO = 24,
  parameter int unsigned MU_SHIFT = 6,
  localparam int unsigned P  = (N + K - 1) / K,
  localparam int unsigned GW = (P > 1) ? $clog2(P) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // stage 1
  input  logic                 issue,
  input  logic [GW-1:0]        grp,
  input  logic signed [BX-1:0] x [K],
  input  logic signed [BO-1:0] e,
  // stage 2: coefficient read and write-back
  output logic [GW-1:0]        h_grp,
  input  logic signed [BH-1:0] h_in [K],
  output logic                 wr_en,
  output logic [GW-1:0]        wr_grp,
  output logic signed [BH-1:0] wr_data [K]
);
  initial assert (BX <= MAX_W && BH <= MAX_W && BO <= MAX_W)
    else $error("lms_adapt_mad: word length above %0d", MAX_W);

  logic                 v_q;
  logic [GW-1:0]        g_q;
  logic signed [BH-1:0] upd_q [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      g_q <= '0;
    end else begin
      v_q <= issue;
      if (issue) g_q <= grp;
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < K; l++) begin
      wide_t p;
      p = wide_t'(x[l]) * wide_t'(e);
      upd_q[l] <= BH'(to_fmt_rnd(p, FX + FO + int'(MU_SHIFT), FH, BH));
    end
  end

  assign h_grp  = g_q;
  assign wr_en  = v_q;
  assign wr_grp = g_q;
  always_comb
    for (int l = 0; l < K; l++) wr_data[l] = h_in[l] + upd_q[l];
endmodule
