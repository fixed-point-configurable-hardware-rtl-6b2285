// lms_filter_mult - multiplier stage of the LMS/DLMS filter part.
//
// K multipliers work in parallel on one group of taps: lane l forms
// x(n-i) * h_i(n). The full product (FX+FH fractional bits) is quantized
// by truncation to the multiplier output format b_m / FM and registered,
// which is the first pipeline stage of the filter part in the document's
// generic architecture. The group tag is registered alongside.
//
// Interface: x, h and tag_in in cycle t; m and tag_out valid in t+1.
module lms_filter_mult
  import fxp_pkg::*;
#(
  parameter int unsigned K  = 4,
  parameter int unsigned BX = 16, parameter int FX = 15,
  parameter int unsigned BH = 16, parameter int FH = 15,
  parameter int unsigned BM = 32, parameter int FM = 30
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [BX-1:0] x [K],
  input  logic signed [BH-1:0] h [K],
  input  grp_tag_t             tag_in,
  output logic signed [BM-1:0] m [K],
  output grp_tag_t             tag_out
);
  initial assert (BX <= MAX_W && BH <= MAX_W && BM <= MAX_W)
    else $error("lms_filter_mult: word length above %0d", MAX_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_out <= '0;
    else        tag_out <= tag_in;
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < K; l++) begin
      wide_t p;
      p = wide_t'(x[l]) * wide_t'(h[l]);
      m[l] <= BM'(to_fmt(p, FX + FH, FM, BM));
    end
  end
endmodule
