// tb_lms_accuracy - output accuracy of the 128-tap LMS at three
// word-length configurations:
//   A  the default formats (16-bit samples and coefficients, 32-bit
//      products and sums);
//   B  shortened (12-bit samples and coefficients, 24-bit products,
//      20-bit sums);
//   C  widened (24-bit samples, 28-bit coefficients, sums with 28
//      fractional bits).
// All three identify the same 8-tap FIR from the same half-scale white
// input, while a double-precision LMS with the same step size runs
// alongside on the 24-bit samples. A and B see those samples truncated to
// their own formats. For each instance the SQNR of yhat against the
// double-precision yhat is measured over the whole run. The test checks
// that A is above 40 dB and at least 10 dB better than B, that C reaches
// 90 dB, and that all instances keep the same sample period.
module tb_lms_accuracy;
  import fxp_pkg::*;
  localparam int N = 128, NS = 1500, MU = 6;
  localparam int BXC = 24, FXC = 23, BHC = 28, FHC = 27, FOC = 28;
  localparam int BXB = 12, FXB = 11, BHB = 12, FHB = 11, BMB = 24, FMB = 22, BOB = 20, FOB = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic x_valid, rdy_a, rdy_b, yv_a, yv_b, ev_a, ev_b;
  logic signed [15:0] xa;
  logic signed [31:0] ya, yh_a, e_a;
  logic signed [BXB-1:0] xb;
  logic signed [BOB-1:0] yb, yh_b, e_b;
  logic signed [15:0] cd_a;
  logic signed [BHB-1:0] cd_b;
  logic rdy_c, yv_c, ev_c;
  logic signed [BXC-1:0] xc;
  logic signed [31:0] yc, yh_c, e_c;
  logic signed [BHC-1:0] cd_c;

  lms_dlms_ip u_a (.clk, .rst_n, .x_valid, .x_ready(rdy_a), .x_in(xa), .y_in(ya),
                   .yhat_valid(yv_a), .yhat(yh_a), .err_valid(ev_a), .err(e_a),
                   .coef_addr('0), .coef_data(cd_a));
  lms_dlms_ip #(.BX(BXB), .FX(FXB), .BH(BHB), .FH(FHB), .BM(BMB), .FM(FMB), .BO(BOB), .FO(FOB))
    u_b (.clk, .rst_n, .x_valid, .x_ready(rdy_b), .x_in(xb), .y_in(yb),
         .yhat_valid(yv_b), .yhat(yh_b), .err_valid(ev_b), .err(e_b),
         .coef_addr('0), .coef_data(cd_b));
  lms_dlms_ip #(.BX(BXC), .FX(FXC), .BH(BHC), .FH(FHC), .FO(FOC))
    u_c (.clk, .rst_n, .x_valid, .x_ready(rdy_c), .x_in(xc), .y_in(yc),
         .yhat_valid(yv_c), .yhat(yh_c), .err_valid(ev_c), .err(e_c),
         .coef_addr('0), .coef_data(cd_c));

  real yf [NS];           // double-precision LMS output
  real qa [NS], qb [NS], qc [NS];  // fixed-point outputs, as reals
  int na = 0, nb = 0, nc = 0;

  always @(posedge clk) begin
    if (rst_n && yv_a && na < NS) begin qa[na] <= real'(yh_a) / 2.0 ** 24; na <= na + 1; end
    if (rst_n && yv_b && nb < NS) begin qb[nb] <= real'(yh_b) / 2.0 ** FOB; nb <= nb + 1; end
    if (rst_n && yv_c && nc < NS) begin qc[nc] <= real'(yh_c) / 2.0 ** FOC; nc <= nc + 1; end
  end

  initial begin
    real w [N], xh [N], hsys [8];
    real sig, noi_a, noi_b, noi_c, sq_a, sq_b, sq_c;
    hsys = '{0.30, -0.22, 0.15, 0.10, -0.08, 0.05, -0.03, 0.02};
    for (int i = 0; i < N; i++) begin w[i] = 0.0; xh[i] = 0.0; end
    x_valid = 0; xa = '0; ya = '0; xb = '0; yb = '0; xc = '0; yc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      real yt, e;
      // input sample, half scale, in Q0.15; B sees its truncation to Q0.11
      xc = BXC'(int'($urandom_range(32'h7fffff)) - 32'h400000);
      xa = 16'(xc >>> (FXC - 15));
      xb = BXB'(xa >>> (15 - FXB));
      for (int i = N - 1; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = real'(xc) / 2.0 ** FXC;
      yt = 0.0;
      for (int i = 0; i < 8; i++) yt += hsys[i] * xh[i];
      ya = 32'($rtoi($floor(yt * 2.0 ** 24)));
      yb = BOB'(ya >>> (24 - FOB));
      yc = ya <<< (FOC - 24);
      // double-precision LMS on the same (Q0.15, Q7.24) data
      yf[n] = 0.0;
      for (int i = 0; i < N; i++) yf[n] += w[i] * xh[i];
      e = real'(ya) / 2.0 ** 24 - yf[n];
      for (int i = 0; i < N; i++) w[i] += xh[i] * e / 2.0 ** MU;
      // hand the sample to both IPs
      x_valid = 1;
      do @(posedge clk); while (!rdy_a);
      checks++;
      if (rdy_b !== rdy_a || rdy_c !== rdy_a) failures++;
      @(negedge clk);
      x_valid = 0;
    end
    wait (na == NS && nb == NS && nc == NS);
    @(negedge clk);
    sig = 0.0; noi_a = 0.0; noi_b = 0.0; noi_c = 0.0;
    for (int n = 0; n < NS; n++) begin
      sig += yf[n] * yf[n];
      noi_a += (qa[n] - yf[n]) ** 2;
      noi_b += (qb[n] - yf[n]) ** 2;
      noi_c += (qc[n] - yf[n]) ** 2;
    end


    sq_a = 10.0 * $log10(sig / noi_a);
    sq_b = 10.0 * $log10(sig / noi_b);
    sq_c = 10.0 * $log10(sig / noi_c);
    $display("yhat SQNR: 16/16/32/32 formats %0.1f dB, 12/12/24/20 formats %0.1f dB, 24/28/32/32 formats %0.1f dB",
             sq_a, sq_b, sq_c);
    checks += 3;
    if (sq_c < 90.0) failures++;
    if (sq_a < 40.0) failures++;
    if (sq_a < sq_b + 10.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 80 + 2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
