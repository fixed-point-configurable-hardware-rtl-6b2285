// lms_adder_tree - pipelined adder tree of the LMS/DLMS filter part.
//
// Sums the K multiplier outputs of one group. Each input is first scaled
// from the multiplier format (BM bits, FM fractional) to the accumulation
// format (BO bits, FO fractional) - the binary-point alignment ahead of an
// addition. The tree has ceil(log2 K) levels of two-input adders. L_ADD
// levels are chained inside one clock cycle, then a register is placed;
// the last level is always registered. This gives the document's
// M_ADD = ceil(log2(K) / L_ADD) pipeline stages. With K = 1 the tree is a
// wire and M_ADD = 0. Missing inputs of a non-power-of-two K are zero.
//
// Interface: d and tag_in in cycle t; sum and tag_out valid in t+M_ADD.
module lms_adder_tree
  import fxp_pkg::*;
#(
  parameter int unsigned K     = 4,
  parameter int unsigned BM    = 32, parameter int FM = 30,
  parameter int unsigned BO    = 32, parameter int FO = 24,
  parameter int unsigned L_ADD = 1    // two-input additions per cycle
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [BM-1:0] d [K],
  input  grp_tag_t             tag_in,
  output logic signed [BO-1:0] sum,
  output grp_tag_t             tag_out
);
  localparam int unsigned LV = $clog2(K);
  localparam int unsigned W2 = 1 << LV;

  initial assert (L_ADD >= 1) else $error("lms_adder_tree: L_ADD must be at least 1");

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic signed [BO-1:0] s [W2 >> l];
    grp_tag_t             t;
    if (l == 0) begin : g_in
      always_comb begin
        for (int j = 0; j < W2; j++)
          s[j] = (j < K) ? BO'(to_fmt(wide_t'(d[j]), FM, FO, BO)) : '0;
        t = tag_in;
      end
    end else if ((l % L_ADD) == 0 || l == LV) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) t <= '0;
        else        t <= g_lvl[l-1].t;
      end
      always_ff @(posedge clk) begin
        for (int j = 0; j < (W2 >> l); j++)
          s[j] <= g_lvl[l-1].s[2*j] + g_lvl[l-1].s[2*j+1];
      end
    end else begin : g_cmb
      always_comb begin
        for (int j = 0; j < (W2 >> l); j++)
          s[j] = g_lvl[l-1].s[2*j] + g_lvl[l-1].s[2*j+1];
        t = g_lvl[l-1].t;
      end
    end
  end

  assign sum     = g_lvl[LV].s[0];
  assign tag_out = g_lvl[LV].t;
endmodule
