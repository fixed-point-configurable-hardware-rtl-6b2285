// lms_ip_harness - drives one lms_dlms_ip and checks it against a
// bit-accurate reference model written here from the update equations:
//   yhat(n) = sum_i Q_o(Q_m(x(n-i) h_i)),  e(n) = y(n) - yhat(n),
//   h_i <- h_i + Q_h(2^-MU * x(n-D-i) * e(n-D)),
// with Q_m, Q_o truncation and Q_h rounding to nearest to the format's
// fractional bits, and wrap-around to
// its word length. The reference y(n) comes from a fixed "unknown" FIR,
// so the weights converge toward it (system identification).
// Checks: every yhat and err value, every final weight, the latency from
// acceptance to yhat_valid, the sample period of back-to-back samples, and
// that the error has shrunk by the end. Reports through checks/failures
// and raises done.
module lms_ip_harness #(
  parameter int unsigned N        = 10,
  parameter int unsigned K        = 4,
  parameter int unsigned L_ADD    = 1,
  parameter int unsigned MU_SHIFT = 2,
  parameter int unsigned DELAY    = 0,
  parameter int unsigned NSAMP    = 400
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall,     // cycles a sample waited for x_ready
  output int   n_backtoback // samples accepted back to back
);
  localparam int BX = 16, FX = 15, BH = 16, FH = 15, BM = 32, FM = 30, BO = 32, FO = 24;
  localparam int P  = (N + K - 1) / K;
  localparam int LV = $clog2(K);
  localparam int MADD = (LV + L_ADD - 1) / L_ADD;
  localparam int PERIOD  = (DELAY == 0) ? (2 * P + MADD + 3) : (P + MADD + 2);
  localparam int LATENCY = P + MADD + 2;
  localparam int AW = (N > 1) ? $clog2(N) : 1;

  logic                 x_valid, x_ready, yhat_valid, err_valid;
  logic signed [BX-1:0] x_in;
  logic signed [BO-1:0] y_in, yhat, err;
  logic [AW-1:0]        coef_addr;
  logic signed [BH-1:0] coef_data;

  lms_dlms_ip #(.N(N), .K(K), .L_ADD(L_ADD), .MU_SHIFT(MU_SHIFT), .DELAY(DELAY)) dut (
    .clk, .rst_n, .x_valid, .x_ready, .x_in, .y_in, .yhat_valid, .yhat,
    .err_valid, .err, .coef_addr, .coef_data
  );

  // ---------------- reference model ----------------
  longint xh [N + DELAY];  // x(n-i)
  longint w  [N];
  longint ebuf [$];
  longint exp_yhat [$], exp_err [$];
  longint t_accept [$];
  longint cyc;
  longint last_accept;
  longint err_abs_first, err_abs_last;
  int     n_acc, n_out;

  function automatic longint wrap(longint v, int b);
    longint m;
    m = longint'(1) <<< b;
    v = v & (m - 1);
    if (v >= (m >>> 1)) v = v - m;
    return v;
  endfunction
  function automatic longint q(longint v, int f_in, int f_out, int b);
    return wrap(v >>> (f_in - f_out), b);
  endfunction

  task automatic model_sample(input longint xn, input longint yn);
    longint acc, e, eu;
    for (int i = N + DELAY - 1; i > 0; i--) xh[i] = xh[i-1];
    xh[0] = xn;
    acc = 0;
    for (int i = 0; i < N; i++)
      acc = wrap(acc + q(q(xh[i] * w[i], FX + FH, FM, BM), FM, FO, BO), BO);
    e = wrap(yn - acc, BO);
    if (DELAY == 0) eu = e;
    else eu = ebuf[DELAY-1];
    for (int i = 0; i < N; i++)
      w[i] = wrap(w[i] + q(xh[i + DELAY] * eu + (64'sd1 <<< (FX + FO + MU_SHIFT - FH - 1)), FX + FO + MU_SHIFT, FH, BH), BH);
    ebuf.push_front(e);
    void'(ebuf.pop_back());
    exp_yhat.push_back(acc);
    exp_err.push_back(e);
  endtask

  // "Unknown" system: y(n) = sum c_k x(n-k), c in Q1.15.
  localparam int NC = 4;
  longint csys [NC] = '{longint'(9830), longint'(-6554), longint'(3277), longint'(1638)};
  longint xs [NC];

  always @(posedge clk) cyc <= cyc + 1;

  // acceptance monitor: update the model, check the sample period
  always @(posedge clk) if (rst_n && x_valid && x_ready) begin
    if (last_accept >= 0 && cyc - last_accept == longint'(PERIOD)) n_backtoback++;
    if (last_accept >= 0 && cyc - last_accept < longint'(PERIOD)) begin
      failures++;
      $display("lms_ip_harness: period %0d below %0d", cyc - last_accept, PERIOD);
    end
    checks++;
    last_accept = cyc;
    t_accept.push_back(cyc);
    model_sample(longint'(x_in), longint'(y_in));
    n_acc++;
  end

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (yhat_valid) begin
      longint ey, t0;
      ey = exp_yhat.pop_front();
      t0 = t_accept.pop_front();
      checks += 2;
      if (longint'(yhat) != ey) begin
        failures++;
        if (failures < 10) $display("lms_ip_harness: yhat %0d expected %0d (sample %0d)", yhat, ey, n_out);
      end
      if (cyc - t0 != longint'(LATENCY)) begin
        failures++;
        if (failures < 10) $display("lms_ip_harness: latency %0d expected %0d", cyc - t0, LATENCY);
      end
    end
    if (err_valid) begin
      longint ee, ae;
      ee = exp_err.pop_front();
      checks++;
      if (longint'(err) != ee) begin
        failures++;
        if (failures < 10) $display("lms_ip_harness: err %0d expected %0d", err, ee);
      end
      ae = (ee < 0) ? -ee : ee;
      if (n_out < 50) err_abs_first += ae;
      if (n_out >= NSAMP - 50) err_abs_last += ae;
      n_out++;
    end
  end

  always @(posedge clk) if (rst_n && x_valid && !x_ready) n_stall++;

  initial begin
    longint xv, yv;
    int gap;
    done = 0; checks = 0; failures = 0; n_stall = 0; n_backtoback = 0;
    cyc = 0; last_accept = -1; n_acc = 0; n_out = 0;
    err_abs_first = 0; err_abs_last = 0;
    x_valid = 0; x_in = '0; y_in = '0; coef_addr = '0;
    for (int i = 0; i < N; i++) w[i] = 0;
    for (int i = 0; i < N + DELAY; i++) xh[i] = 0;
    for (int i = 0; i < NC; i++) xs[i] = 0;
    for (int i = 0; i < (DELAY > 0 ? DELAY : 1); i++) ebuf.push_back(0);
    @(posedge rst_n);
    for (int n = 0; n < NSAMP; n++) begin
      // input in [-0.5, 0.5)
      xv = longint'($urandom_range(32767)) - 16384;
      for (int i = NC - 1; i > 0; i--) xs[i] = xs[i-1];
      xs[0] = xv;
      yv = 0;
      for (int i = 0; i < NC; i++) yv += csys[i] * xs[i];
      yv = yv >>> (FX + 15 - FO);
      gap = (n % 7 == 3) ? int'($urandom_range(4)) : 0;   // occasional idle gaps
      @(negedge clk);
      x_valid = 0;
      repeat (gap) @(negedge clk);
      x_valid = 1; x_in = BX'(xv); y_in = BO'(yv);
      @(posedge clk);
      while (!x_ready) @(posedge clk);
    end
    @(negedge clk);
    x_valid = 0;
    repeat (2 * PERIOD + 10) @(negedge clk);
    // final weights
    for (int i = 0; i < N; i++) begin
      coef_addr = AW'(i);
      #1;
      checks++;
      if (longint'(coef_data) != w[i]) begin
        failures++;
        $display("lms_ip_harness: h[%0d] = %0d expected %0d", i, coef_data, w[i]);
      end
    end
    checks += 3;
    if (n_backtoback != NSAMP - 1) begin
      failures++;
      $display("lms_ip_harness: %0d of %0d samples at the nominal period", n_backtoback, NSAMP - 1);
    end
    if (n_out != NSAMP) begin
      failures++;
      $display("lms_ip_harness: %0d outputs for %0d samples", n_out, NSAMP);
    end
    if (!(err_abs_last * 4 < err_abs_first)) begin
      failures++;
      $display("lms_ip_harness: error did not shrink (%0d -> %0d)", err_abs_first, err_abs_last);
    end
    done = 1;
  end
endmodule
