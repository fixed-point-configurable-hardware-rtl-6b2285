// lms_error - error computation of the LMS/DLMS IP.
//
// When the filter output is valid it forms e(n) = y(n) - yhat(n) in the
// accumulation format (BO bits, wrap-around) and registers it: this is
// the subtraction pipeline stage. For the delayed LMS (DELAY = D > 0) the
// errors also enter a D-deep delay line whose oldest entry is given to
// the adaptation part: once e(n) is registered it holds e(n+1-D), the
// error the update of the next sample n+1 needs. For the plain LMS
// (D = 0) the adaptation of sample n uses e(n) itself. All registers reset to zero, so the first D updates of a DLMS
// use a zero error.
//
// Interface: yhat_valid, yhat, y in cycle t; e / e_valid / e_adapt
// updated at the end of t.
module lms_error #(
  parameter int unsigned BO    = 32,
  parameter int unsigned DELAY = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 yhat_valid,
  input  logic signed [BO-1:0] yhat,
  input  logic signed [BO-1:0] y,
  output logic signed [BO-1:0] e,        // newest error e(n)
  output logic                 e_valid,  // pulses the cycle after yhat_valid
  output logic signed [BO-1:0] e_adapt   // error used by the update, e(n-D)
);
  localparam int unsigned DL = (DELAY > 0) ? DELAY : 1;
  logic signed [BO-1:0] dline [DL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e       <= '0;
      e_valid <= 1'b0;
      for (int k = 0; k < DL; k++) dline[k] <= '0;
    end else begin
      e_valid <= yhat_valid;
      if (yhat_valid) begin
        e        <= y - yhat;
        dline[0] <= y - yhat;
        for (int k = 1; k < DL; k++) dline[k] <= dline[k-1];
      end
    end
  end

  assign e_adapt = (DELAY == 0) ? e : dline[DL-1];
endmodule
