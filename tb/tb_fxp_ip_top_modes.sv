// tb_fxp_ip_top_modes - end-to-end test of the other generation-time
// modes at reduced size: (a) a delayed LMS (D = 2) with N = 24, K = 5
// (K does not divide N), two adder levels per cycle, next to a direct
// form I IIR cascade; (b) a plain LMS with N = 16, K = 8 next to a direct
// form II IIR cascade. Both are checked bit for bit by top_checker.
module tb_fxp_ip_top_modes;
  import fxp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] xv, xr, yv, ev, iv, iyv, dn;
  logic signed [15:0] x [2], cd [2], ix [2], iy [2];
  logic signed [31:0] y [2], yh [2], er [2];
  logic [4:0] ca0;
  logic [3:0] ca1;
  logic signed [12:0] ib [2][4][3], ia [2][4][2];
  int c [2], f [2];

  fxp_ip_top #(.N(24), .K(5), .L_ADD(2), .MU_SHIFT(4), .LMS_DELAY(2), .IIR_FORM(IIR_DF1)) dut0 (
    .clk, .rst_n, .lms_x_valid(xv[0]), .lms_x_ready(xr[0]), .lms_x(x[0]), .lms_y(y[0]),
    .lms_yhat_valid(yv[0]), .lms_yhat(yh[0]), .lms_err_valid(ev[0]), .lms_err(er[0]),
    .lms_coef_addr(ca0), .lms_coef_data(cd[0]), .iir_x_valid(iv[0]), .iir_x(ix[0]),
    .iir_b(ib[0]), .iir_a(ia[0]), .iir_y_valid(iyv[0]), .iir_y(iy[0]));
  top_checker #(.N(24), .K(5), .L_ADD(2), .MU_SHIFT(4), .DELAY(2), .IIR_FORM(0),
                .NSAMP(600), .NIIR(1500)) chk0 (
    .clk, .rst_n, .lms_x_valid(xv[0]), .lms_x_ready(xr[0]), .lms_x(x[0]), .lms_y(y[0]),
    .lms_yhat_valid(yv[0]), .lms_yhat(yh[0]), .lms_err_valid(ev[0]), .lms_err(er[0]),
    .lms_coef_addr(ca0), .lms_coef_data(cd[0]), .iir_x_valid(iv[0]), .iir_x(ix[0]),
    .iir_b(ib[0]), .iir_a(ia[0]), .iir_y_valid(iyv[0]), .iir_y(iy[0]),
    .done(dn[0]), .checks(c[0]), .failures(f[0]));

  fxp_ip_top #(.N(16), .K(8), .MU_SHIFT(4), .IIR_FORM(IIR_DF2)) dut1 (
    .clk, .rst_n, .lms_x_valid(xv[1]), .lms_x_ready(xr[1]), .lms_x(x[1]), .lms_y(y[1]),
    .lms_yhat_valid(yv[1]), .lms_yhat(yh[1]), .lms_err_valid(ev[1]), .lms_err(er[1]),
    .lms_coef_addr(ca1), .lms_coef_data(cd[1]), .iir_x_valid(iv[1]), .iir_x(ix[1]),
    .iir_b(ib[1]), .iir_a(ia[1]), .iir_y_valid(iyv[1]), .iir_y(iy[1]));
  top_checker #(.N(16), .K(8), .MU_SHIFT(4), .IIR_FORM(1), .NSAMP(600), .NIIR(1500)) chk1 (
    .clk, .rst_n, .lms_x_valid(xv[1]), .lms_x_ready(xr[1]), .lms_x(x[1]), .lms_y(y[1]),
    .lms_yhat_valid(yv[1]), .lms_yhat(yh[1]), .lms_err_valid(ev[1]), .lms_err(er[1]),
    .lms_coef_addr(ca1), .lms_coef_data(cd[1]), .iir_x_valid(iv[1]), .iir_x(ix[1]),
    .iir_b(ib[1]), .iir_a(ia[1]), .iir_y_valid(iyv[1]), .iir_y(iy[1]),
    .done(dn[1]), .checks(c[1]), .failures(f[1]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (dn == 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1]);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("tb_fxp_ip_top_modes: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1] + 1);
    $finish;
  end
endmodule
