// top_checker - drives both IPs of fxp_ip_top at once and checks them.
//   LMS/DLMS: system identification of a fixed 4-tap FIR from full-scale
//     random input. Every yhat and err is compared with a bit-accurate
//     model of the update equations, all weights are read back at the end,
//     and the error must have shrunk by CONV_RATIO.
//   IIR: four second-order cells (poles at radii 0.5 ... 0.9), random
//     input with idle cycles; every output is compared with chained
//     bit-accurate cell models and the SQNR against double precision must
//     exceed 30 dB.
// Counts how often each mechanism occurred - samples accepted, input
// stalls on x_ready, back-to-back samples at the nominal period, weight
// updates, IIR samples and idle cycles - and counts a failure for any
// that never did.
module top_checker
  import iir_ref_pkg::*;
#(
  parameter int N = 128, K = 4, L_ADD = 1, MU_SHIFT = 6, DELAY = 0,
  parameter int IIR_FORM = 2, NCELL = 4,
  parameter int NSAMP = 2000, NIIR = 3000,
  parameter int CONV_RATIO = 2,
  localparam int BX = 16, FX = 15, BH = 16, FH = 15, BM = 32, FM = 30, BO = 32, FO = 24,
  localparam int BS = 16, BC = 13, FC = 11, BA = 32,
  localparam int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 lms_x_valid,
  input  logic                 lms_x_ready,
  output logic signed [BX-1:0] lms_x,
  output logic signed [BO-1:0] lms_y,
  input  logic                 lms_yhat_valid,
  input  logic signed [BO-1:0] lms_yhat,
  input  logic                 lms_err_valid,
  input  logic signed [BO-1:0] lms_err,
  output logic [AW-1:0]        lms_coef_addr,
  input  logic signed [BH-1:0] lms_coef_data,
  output logic                 iir_x_valid,
  output logic signed [BS-1:0] iir_x,
  output logic signed [BC-1:0] iir_b [NCELL][3],
  output logic signed [BC-1:0] iir_a [NCELL][2],
  input  logic                 iir_y_valid,
  input  logic signed [BS-1:0] iir_y,
  output logic                 done,
  output int                   checks,
  output int                   failures
);
  localparam int P = (N + K - 1) / K;
  localparam int MADD = ($clog2(K) + L_ADD - 1) / L_ADD;
  localparam int PERIOD = (DELAY == 0) ? (2 * P + MADD + 3) : (P + MADD + 2);

  // mechanism counters
  int n_accept, n_stall, n_b2b, n_upd, n_iir, n_iir_idle;
  logic lms_done, iir_done;

  // ---------------- LMS reference ----------------
  longint xh [N + DELAY];
  longint w [N];
  longint ebuf [$];
  longint exp_yhat [$], exp_err [$];
  longint cyc, last_accept, ea_first, ea_last;
  int n_out;

  function automatic longint q(longint v, int f_in, int f_out, int b);
    return wrapb(v >>> (f_in - f_out), b);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && lms_x_valid && lms_x_ready) begin
    longint acc, e, eu;
    if (last_accept >= 0) begin
      checks++;
      if (cyc - last_accept == longint'(PERIOD)) n_b2b++;
      else if (cyc - last_accept < longint'(PERIOD)) failures++;
    end
    last_accept = cyc;
    n_accept++;
    for (int i = N + DELAY - 1; i > 0; i--) xh[i] = xh[i-1];
    xh[0] = longint'(lms_x);
    acc = 0;
    for (int i = 0; i < N; i++)
      acc = wrapb(acc + q(q(xh[i] * w[i], FX + FH, FM, BM), FM, FO, BO), BO);
    e = wrapb(longint'(lms_y) - acc, BO);
    eu = (DELAY == 0) ? e : ebuf[DELAY-1];
    for (int i = 0; i < N; i++) begin
      longint u;
      u = q(xh[i + DELAY] * eu + (64'sd1 <<< (FX + FO + MU_SHIFT - FH - 1)), FX + FO + MU_SHIFT, FH, BH);
      if (u != 0) n_upd++;
      w[i] = wrapb(w[i] + u, BH);
    end
    ebuf.push_front(e);
    void'(ebuf.pop_back());
    exp_yhat.push_back(acc);
    exp_err.push_back(e);
  end

  always @(posedge clk) if (rst_n && lms_x_valid && !lms_x_ready) n_stall++;

  always @(posedge clk) if (rst_n) begin
    if (lms_yhat_valid) begin
      checks++;
      if (longint'(lms_yhat) != exp_yhat.pop_front()) begin
        failures++;
        if (failures < 10) $display("top_checker: yhat mismatch at output %0d", n_out);
      end
    end
    if (lms_err_valid) begin
      longint ee;
      ee = exp_err.pop_front();
      checks++;
      if (longint'(lms_err) != ee) failures++;
      if (n_out < 100) ea_first += (ee < 0) ? -ee : ee;
      if (n_out >= NSAMP - 100) ea_last += (ee < 0) ? -ee : ee;
      n_out++;
    end
  end

  localparam int NC = 4;
  longint csys [NC] = '{longint'(9830), longint'(-6554), longint'(3277), longint'(1638)};

  initial begin : lms_drive
    longint xs [NC];
    longint xv, yv;
    lms_done = 0;
    cyc = 0; last_accept = -1; n_out = 0; ea_first = 0; ea_last = 0;
    n_accept = 0; n_stall = 0; n_b2b = 0; n_upd = 0;
    for (int i = 0; i < N; i++) w[i] = 0;
    for (int i = 0; i < N + DELAY; i++) xh[i] = 0;
    for (int i = 0; i < NC; i++) xs[i] = 0;
    for (int i = 0; i < (DELAY > 0 ? DELAY : 1); i++) ebuf.push_back(0);
    lms_x_valid = 0; lms_x = '0; lms_y = '0; lms_coef_addr = '0;
    @(posedge rst_n);
    for (int n = 0; n < NSAMP; n++) begin
      xv = longint'($urandom_range(65535)) - 32768;   // full scale
      for (int i = NC - 1; i > 0; i--) xs[i] = xs[i-1];
      xs[0] = xv;
      yv = 0;
      for (int i = 0; i < NC; i++) yv += csys[i] * xs[i];
      yv = yv >>> (FX + 15 - FO);
      @(negedge clk);
      lms_x_valid = 0;
      if (n % 50 == 25) repeat (PERIOD + 3) @(negedge clk);   // let the IP go idle
      lms_x_valid = 1; lms_x = BX'(xv); lms_y = BO'(yv);
      @(posedge clk);
      while (!lms_x_ready) @(posedge clk);
    end
    @(negedge clk);
    lms_x_valid = 0;
    repeat (2 * PERIOD + 10) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      lms_coef_addr = AW'(i);
      #1;
      checks++;
      if (longint'(lms_coef_data) != w[i]) begin
        failures++;
        if (failures < 10) $display("top_checker: h[%0d] = %0d expected %0d", i, lms_coef_data, w[i]);
      end
    end
    checks += 2;
    if (n_out != NSAMP) failures++;
    $display("top_checker: LMS mean |e| first 100 %0d, last 100 %0d", ea_first / 100, ea_last / 100);
    if (!(ea_last * CONV_RATIO < ea_first)) failures++;
    lms_done = 1;
  end

  // ---------------- IIR ----------------
  iir_fx_ref fx [NCELL];
  iir_fl_ref fl [NCELL];

  initial begin : iir_drive
    real sig_p, noise_p, yr, sq;
    longint ey;
    logic vq;
    iir_done = 0; n_iir = 0; n_iir_idle = 0;
    sig_p = 0.0; noise_p = 0.0;
    for (int c = 0; c < NCELL; c++) begin
      real r, th, g;
      r  = 0.5 + 0.4 * real'(c) / real'((NCELL > 1) ? NCELL - 1 : 1);
      th = 0.35 + 0.7 * real'(c);
      g  = 1.0 - r;
      iir_b[c][0] = BC'($rtoi(g * 2048.0));
      iir_b[c][1] = '0;
      iir_b[c][2] = -iir_b[c][0];
      iir_a[c][0] = BC'($rtoi(-2.0 * r * $cos(th) * 2048.0));
      iir_a[c][1] = BC'($rtoi(r * r * 2048.0));
      fx[c] = new(IIR_FORM, 2, BS, FC, BA);
      fl[c] = new(2);
      for (int k = 0; k < 3; k++) begin
        fx[c].b[k] = longint'(iir_b[c][k]);
        fl[c].b[k] = real'(iir_b[c][k]) / 2048.0;
      end
      for (int k = 0; k < 2; k++) begin
        fx[c].a[k] = longint'(iir_a[c][k]);
        fl[c].a[k] = real'(iir_a[c][k]) / 2048.0;
      end
    end
    iir_x_valid = 0; iir_x = '0;
    @(posedge rst_n);
    vq = 0; ey = 0;
    for (int n = 0; n < NIIR; n++) begin
      @(negedge clk);
      checks++;
      if (iir_y_valid != vq) failures++;
      if (vq) begin
        checks++;
        if (longint'(iir_y) != ey) failures++;
      end
      iir_x_valid = ($urandom_range(4) != 0);
      iir_x = BS'(int'($urandom_range(8191)) - 4096);
      vq = iir_x_valid;
      if (iir_x_valid) begin
        n_iir++;
        ey = longint'(iir_x);
        for (int c = 0; c < NCELL; c++) ey = fx[c].step(ey);
        yr = real'(iir_x) / 8192.0;
        for (int c = 0; c < NCELL; c++) yr = fl[c].step(yr);
        sig_p += yr * yr;
        noise_p += (real'(ey) / 8192.0 - yr) ** 2;
      end else n_iir_idle++;
    end
    @(negedge clk);
    iir_x_valid = 0;
    sq = 10.0 * $log10(sig_p / noise_p);
    $display("top_checker: IIR SQNR %0.1f dB", sq);
    checks++;
    if (sq < 30.0) failures++;
    iir_done = 1;
  end

  initial begin
    done = 0; checks = 0; failures = 0;
    wait (lms_done && iir_done);
    $display("top_checker: accepted %0d, stalled cycles %0d, back-to-back %0d, nonzero updates %0d, IIR samples %0d, IIR idle %0d",
             n_accept, n_stall, n_b2b, n_upd, n_iir, n_iir_idle);
    checks += 6;
    if (n_accept != NSAMP) failures++;
    if (n_stall == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_upd == 0) failures++;
    if (n_iir == 0) failures++;
    if (n_iir_idle == 0) failures++;
    done = 1;
  end
endmodule
