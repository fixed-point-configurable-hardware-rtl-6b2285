// tb_lms_ctrl - drives the two controller variants (LMS, D = 0, and DLMS,
// D = 1) with P = 5 groups and a filter-output pulse returned a fixed
// number of cycles (4) after the last filter issue, as a pipeline would.
// Checks the issue order of filter and adaptation groups, the
// first/last marks, that samples are only taken when ready, and the
// sample period: LMS 2P + 4 + 1 cycles here, DLMS P + 4 (the next sample
// is taken in the cycle the filter output arrives).
module tb_lms_ctrl;
  localparam int P = 5, GW = 3, LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic x_valid;
  logic [1:0] x_ready, push, f_issue, f_first, f_last, a_issue, yv;
  logic [GW-1:0] f_grp [2], a_grp [2];

  lms_ctrl #(.P(P), .DELAY(0)) u0 (.clk, .rst_n, .x_valid, .x_ready(x_ready[0]), .push(push[0]),
    .yhat_valid(yv[0]), .f_issue(f_issue[0]), .f_grp(f_grp[0]), .f_first(f_first[0]),
    .f_last(f_last[0]), .a_issue(a_issue[0]), .a_grp(a_grp[0]));
  lms_ctrl #(.P(P), .DELAY(1)) u1 (.clk, .rst_n, .x_valid, .x_ready(x_ready[1]), .push(push[1]),
    .yhat_valid(yv[1]), .f_issue(f_issue[1]), .f_grp(f_grp[1]), .f_first(f_first[1]),
    .f_last(f_last[1]), .a_issue(a_issue[1]), .a_grp(a_grp[1]));

  // model of the filter pipeline: yhat_valid LAT cycles after the last issue
  logic [LAT-1:0] pipe [2];
  always_ff @(posedge clk) for (int i = 0; i < 2; i++)
    pipe[i] <= rst_n ? {pipe[i][LAT-2:0], f_issue[i] & f_last[i]} : '0;
  always_comb for (int i = 0; i < 2; i++) yv[i] = pipe[i][LAT-1];

  int cyc = 0;
  int last_push [2] = '{-1, -1};
  int fexp [2] = '{0, 0};
  int aexp [2] = '{0, 0};
  int npush [2] = '{0, 0};
  int nadapt [2] = '{0, 0};
  localparam int PER [2] = '{2 * P + LAT + 1, P + LAT};

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) for (int i = 0; i < 2; i++) begin
      if (push[i]) begin
        checks++;
        if (!x_ready[i] || !x_valid) failures++;
        if (last_push[i] >= 0) begin
          checks++;
          if (cyc - last_push[i] != PER[i]) begin
            failures++;
            $display("ctrl %0d: period %0d expected %0d", i, cyc - last_push[i], PER[i]);
          end
        end
        last_push[i] = cyc;
        npush[i]++;
      end
      if (f_issue[i]) begin
        checks += 2;
        if (int'(f_grp[i]) != fexp[i]) failures++;
        if (f_first[i] != (fexp[i] == 0) || f_last[i] != (fexp[i] == P - 1)) failures++;
        fexp[i] = (fexp[i] + 1) % P;
        // DLMS adapts in step with the filter
        if (i == 1) begin
          checks++;
          if (!a_issue[i] || a_grp[i] != f_grp[i]) failures++;
        end
      end
      if (a_issue[i]) begin
        checks++;
        if (i == 0 && (f_issue[i] || int'(a_grp[i]) != aexp[i])) failures++;
        aexp[i] = (aexp[i] + 1) % P;
        nadapt[i]++;
      end
    end
  end

  initial begin
    x_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    x_valid = 1;                 // samples always available
    repeat (20 * PER[0]) @(negedge clk);
    x_valid = 0;
    repeat (3 * PER[0]) @(negedge clk);
    checks += 3;
    if (npush[0] < 19 || npush[1] < npush[0] + 10) failures++;
    if (nadapt[0] != npush[0] * P) failures++;
    if (x_ready != 2'b11) failures++;   // both idle at the end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
