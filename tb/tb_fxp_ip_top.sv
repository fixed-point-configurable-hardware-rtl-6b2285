// tb_fxp_ip_top - end-to-end test of the design at its default sizes:
// a 128-tap LMS filter with parallelism 4 identifying an unknown FIR over
// 2000 samples, and the 8th-order transposed-form-II IIR cascade, both
// checked bit for bit by top_checker.
module tb_fxp_ip_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lms_x_valid, lms_x_ready, lms_yhat_valid, lms_err_valid, iir_x_valid, iir_y_valid;
  logic signed [15:0] lms_x, lms_coef_data, iir_x, iir_y;
  logic signed [31:0] lms_y, lms_yhat, lms_err;
  logic [6:0] lms_coef_addr;
  logic signed [12:0] iir_b [4][3], iir_a [4][2];
  logic done;
  int checks, failures;

  fxp_ip_top dut (.*);

  top_checker chk (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("tb_fxp_ip_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
