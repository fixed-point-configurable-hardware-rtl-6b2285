// tb_lms_error - random (y, yhat) pairs into two error units, D = 0 and
// D = 3. Checks e = y - yhat one cycle after yhat_valid, e_valid, and that
// e_adapt is e(n) for D = 0, and for D = 3 e(n-2), which the next
// sample n+1 uses as its e(n+1-3) (zero before enough errors exist).
module tb_lms_error;
  localparam int BO = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic yhat_valid;
  logic signed [BO-1:0] yhat, y, e0, ea0, e3, ea3;
  logic ev0, ev3;
  int checks = 0, failures = 0;
  longint hist [$];

  lms_error #(.BO(BO), .DELAY(0)) u0 (.clk, .rst_n, .yhat_valid, .yhat, .y,
    .e(e0), .e_valid(ev0), .e_adapt(ea0));
  lms_error #(.BO(BO), .DELAY(3)) u3 (.clk, .rst_n, .yhat_valid, .yhat, .y,
    .e(e3), .e_valid(ev3), .e_adapt(ea3));

  function automatic longint wrapo(longint v);
    v = v & ((longint'(1) << BO) - 1);
    if (v >= (longint'(1) << (BO - 1))) v -= (longint'(1) << BO);
    return v;
  endfunction

  initial begin
    yhat_valid = 0; yhat = '0; y = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      longint ee, ed;
      @(negedge clk);
      yhat_valid = 1;
      yhat = BO'($urandom);
      y = BO'($urandom);
      ee = wrapo(longint'(y) - longint'(yhat));
      hist.push_back(ee);
      @(negedge clk);
      yhat_valid = 0;
      y = BO'($urandom);     // must not matter any more
      ed = (n >= 2) ? hist[n - 2] : 0;   // the next sample uses e(n+1-3)
      checks += 5;
      if (!ev0 || !ev3) failures++;
      if (longint'(e0) != ee || longint'(e3) != ee) failures++;
      if (longint'(ea0) != ee) failures++;
      if (longint'(ea3) != ed) begin
        failures++;
        $display("n=%0d e_adapt %0d expected %0d", n, ea3, ed);
      end
      @(negedge clk);
      if (ev0) failures++;   // one-cycle pulse
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
