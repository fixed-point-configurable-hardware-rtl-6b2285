// lms_accumulator - final accumulation stage of the LMS/DLMS filter part.
//
// Adds the partial sums of the N/K groups of one sample. The first group
// of a sample loads the register, later groups add to it (BO bits, wrap
// around). When the last group has been added the register holds the
// filter output yhat(n) = w_n^t x_n and y_valid pulses for one cycle.
//
// Interface: s and tag_in in cycle t; acc updated at the end of t;
// y / y_valid in t+1 for the last group.
module lms_accumulator
  import fxp_pkg::*;
#(
  parameter int unsigned BO = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [BO-1:0] s,
  input  grp_tag_t             tag_in,
  output logic signed [BO-1:0] y,
  output logic                 y_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= tag_in.valid & tag_in.last;
      if (tag_in.valid) y <= tag_in.first ? s : y + s;
    end
  end
endmodule
