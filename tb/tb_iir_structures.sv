// tb_iir_structures - the 8th-order IIR filter of tb_iir_permutations
// (four resonant second-order sections) built from larger cells:
//   * two fourth-order cells: the four sections can be paired in three
//     ways (factorisations) and each pair of cells placed in two orders,
//     six structures per form, with 15-bit coefficients (11 fractional);
//   * one eighth-order cell, with 24-bit coefficients (18 fractional) and
//     a 48-bit accumulator.
// Together with the 24 second-order orders this covers the 31 cell
// arrangements of each form. Cell coefficients are the products of the
// section polynomials, rounded to the coefficient format. For each of the
// six fourth-order structures the three forms are reset, loaded and fed
// 1500 random samples; the eighth-order cells run alongside in every
// pass. Every output is checked bit for bit against the chained
// reference cell models, and the SQNR against a double-precision filter
// with the same quantized coefficients is reported. The check requires
// the fourth-order SQNR to depend on the structure (spread above 1 dB for
// at least one form) and every coefficient to fit its format.
module tb_iir_structures;
  import fxp_pkg::*;
  import iir_ref_pkg::*;
  localparam int BS = 16, FS = 13, NS = 1500, NSEC = 4;
  localparam int BC4 = 15, FC4 = 11, BA4 = 32;
  localparam int BC8 = 24, FC8 = 18, BA8 = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic x_valid;
  logic signed [BS-1:0] x_in, y_out [6];
  logic y_valid [6];
  logic signed [BC4-1:0] b4 [2][5], a4 [2][4];
  logic signed [BC8-1:0] b8 [1][9], a8 [1][8];

  iir_cascade #(.CELL_ORDER(4), .FORM(IIR_DF1), .BC(BC4), .FC(FC4), .BA(BA4)) u0 (.clk, .rst_n,
    .x_valid, .x_in, .b_coef(b4), .a_coef(a4), .y_valid(y_valid[0]), .y_out(y_out[0]));
  iir_cascade #(.CELL_ORDER(4), .FORM(IIR_DF2), .BC(BC4), .FC(FC4), .BA(BA4)) u1 (.clk, .rst_n,
    .x_valid, .x_in, .b_coef(b4), .a_coef(a4), .y_valid(y_valid[1]), .y_out(y_out[1]));
  iir_cascade #(.CELL_ORDER(4), .FORM(IIR_TDF2), .BC(BC4), .FC(FC4), .BA(BA4)) u2 (.clk, .rst_n,
    .x_valid, .x_in, .b_coef(b4), .a_coef(a4), .y_valid(y_valid[2]), .y_out(y_out[2]));
  iir_cascade #(.CELL_ORDER(8), .FORM(IIR_DF1), .BC(BC8), .FC(FC8), .BA(BA8)) u3 (.clk, .rst_n,
    .x_valid, .x_in, .b_coef(b8), .a_coef(a8), .y_valid(y_valid[3]), .y_out(y_out[3]));
  iir_cascade #(.CELL_ORDER(8), .FORM(IIR_DF2), .BC(BC8), .FC(FC8), .BA(BA8)) u4 (.clk, .rst_n,
    .x_valid, .x_in, .b_coef(b8), .a_coef(a8), .y_valid(y_valid[4]), .y_out(y_out[4]));
  iir_cascade #(.CELL_ORDER(8), .FORM(IIR_TDF2), .BC(BC8), .FC(FC8), .BA(BA8)) u5 (.clk, .rst_n,
    .x_valid, .x_in, .b_coef(b8), .a_coef(a8), .y_valid(y_valid[5]), .y_out(y_out[5]));

  // section polynomials (real values of the Q1.11 second-order sections)
  real sb [NSEC][3], sa [NSEC][3];
  iir_fx_ref fx [6][2];
  iir_fl_ref fl4 [2], fl8;
  real smin [3], smax [3], sig8, noi8 [3];

  // round to nearest and check the range of a w-bit coefficient
  function automatic longint qcoef(real v, int f, int w);
    longint q;
    q = longint'($rtoi($floor(v * 2.0 ** f + 0.5)));
    checks++;
    if (q >= (longint'(1) << (w - 1)) || q < -(longint'(1) << (w - 1))) begin
      failures++;
      $display("coefficient %f does not fit %0d bits with %0d fractional", v, w, f);
    end
    return q;
  endfunction

  initial begin
    real rr [NSEC], th [NSEC];
    real p8b [9], p8a [9];
    int pr [3][4];
    rr = '{0.55, 0.7, 0.85, 0.93};
    th = '{0.3, 0.9, 1.6, 2.4};
    for (int c = 0; c < NSEC; c++) begin
      real g;
      g = real'($rtoi((1.0 - rr[c]) * 2048.0)) / 2048.0;
      sb[c] = '{g, 0.0, -g};
      sa[c] = '{1.0, real'($rtoi(-2.0 * rr[c] * $cos(th[c]) * 2048.0)) / 2048.0,
                real'($rtoi(rr[c] * rr[c] * 2048.0)) / 2048.0};
    end
    // the three ways to pair four sections: (0,1)(2,3), (0,2)(1,3), (0,3)(1,2)
    pr = '{'{0, 1, 2, 3}, '{0, 2, 1, 3}, '{0, 3, 1, 2}};
    // eighth-order cell: product of all four sections
    for (int k = 0; k < 9; k++) begin p8b[k] = 0.0; p8a[k] = 0.0; end
    p8b[0] = 1.0; p8a[0] = 1.0;
    for (int c = 0; c < NSEC; c++) begin
      real tb_ [9], ta [9];
      for (int k = 0; k < 9; k++) begin tb_[k] = 0.0; ta[k] = 0.0; end
      for (int i = 0; i < 7; i++) for (int j = 0; j < 3; j++) begin
        tb_[i+j] += p8b[i] * sb[c][j];
        ta[i+j]  += p8a[i] * sa[c][j];
      end
      p8b = tb_; p8a = ta;
    end
    for (int k = 0; k < 9; k++) b8[0][k] = BC8'(qcoef(p8b[k], FC8, BC8));
    for (int k = 0; k < 8; k++) a8[0][k] = BC8'(qcoef(p8a[k+1], FC8, BC8));

    for (int f = 0; f < 3; f++) begin smin[f] = 1000.0; smax[f] = -1000.0; noi8[f] = 0.0; end
    sig8 = 0.0;
    x_valid = 0; x_in = '0;
    for (int run = 0; run < 6; run++) begin
      real sig4, noi4 [3];
      longint ey [6];
      logic vq;
      // cells of this structure
      for (int ce = 0; ce < 2; ce++) begin
        int s0, s1;
        real pb [5], pa [5];
        s0 = pr[run / 2][2 * (ce ^ (run % 2))];
        s1 = pr[run / 2][2 * (ce ^ (run % 2)) + 1];
        for (int k = 0; k < 5; k++) begin pb[k] = 0.0; pa[k] = 0.0; end
        for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
          pb[i+j] += sb[s0][i] * sb[s1][j];
          pa[i+j] += sa[s0][i] * sa[s1][j];
        end
        for (int k = 0; k < 5; k++) b4[ce][k] = BC4'(qcoef(pb[k], FC4, BC4));
        for (int k = 0; k < 4; k++) a4[ce][k] = BC4'(qcoef(pa[k+1], FC4, BC4));
      end
      @(negedge clk);
      rst_n = 0;
      for (int f = 0; f < 3; f++) for (int ce = 0; ce < 2; ce++) begin
        fx[f][ce] = new(f, 4, BS, FC4, BA4);
        for (int k = 0; k < 5; k++) fx[f][ce].b[k] = longint'(b4[ce][k]);
        for (int k = 0; k < 4; k++) fx[f][ce].a[k] = longint'(a4[ce][k]);
      end
      for (int ce = 0; ce < 2; ce++) begin
        fl4[ce] = new(4);
        for (int k = 0; k < 5; k++) fl4[ce].b[k] = real'(b4[ce][k]) / 2.0 ** FC4;
        for (int k = 0; k < 4; k++) fl4[ce].a[k] = real'(a4[ce][k]) / 2.0 ** FC4;
      end
      for (int f = 0; f < 3; f++) begin
        fx[3+f][0] = new(f, 8, BS, FC8, BA8);
        for (int k = 0; k < 9; k++) fx[3+f][0].b[k] = longint'(b8[0][k]);
        for (int k = 0; k < 8; k++) fx[3+f][0].a[k] = longint'(a8[0][k]);
      end
      fl8 = new(8);
      for (int k = 0; k < 9; k++) fl8.b[k] = real'(b8[0][k]) / 2.0 ** FC8;
      for (int k = 0; k < 8; k++) fl8.a[k] = real'(a8[0][k]) / 2.0 ** FC8;
      @(negedge clk);
      rst_n = 1;
      sig4 = 0.0;
      for (int f = 0; f < 3; f++) noi4[f] = 0.0;
      vq = 0;
      for (int n = 0; n < NS; n++) begin
        real y4, y8;
        @(negedge clk);
        if (vq) for (int f = 0; f < 6; f++) begin
          checks++;
          if (longint'(y_out[f]) != ey[f] || !y_valid[f]) begin
            failures++;
            if (failures < 10) $display("run %0d instance %0d: %0d expected %0d", run, f, y_out[f], ey[f]);
          end
        end
        x_valid = 1;
        x_in = BS'(int'($urandom_range(16383)) - 8192);
        vq = 1;
        for (int f = 0; f < 3; f++) begin
          ey[f] = longint'(x_in);
          for (int ce = 0; ce < 2; ce++) ey[f] = fx[f][ce].step(ey[f]);
          ey[3+f] = fx[3+f][0].step(longint'(x_in));
        end
        y4 = real'(x_in) / 8192.0;
        for (int ce = 0; ce < 2; ce++) y4 = fl4[ce].step(y4);
        y8 = fl8.step(real'(x_in) / 8192.0);
        sig4 += y4 * y4;
        sig8 += y8 * y8;
        for (int f = 0; f < 3; f++) begin
          noi4[f] += (real'(ey[f]) / 8192.0 - y4) ** 2;
          noi8[f] += (real'(ey[3+f]) / 8192.0 - y8) ** 2;
        end
      end
      @(negedge clk);
      x_valid = 0;
      for (int f = 0; f < 3; f++) begin
        real sq;
        sq = 10.0 * $log10(sig4 / noi4[f]);
        if (sq < smin[f]) smin[f] = sq;
        if (sq > smax[f]) smax[f] = sq;
      end
    end
    for (int f = 0; f < 3; f++)
      $display("structure %0d (0 DF1, 1 DF2, 2 TDF2), two 4th-order cells: SQNR over 6 structures %0.1f .. %0.1f dB",
               f, smin[f], smax[f]);
    for (int f = 0; f < 3; f++)
      $display("structure %0d, one 8th-order cell: SQNR %0.1f dB", f, 10.0 * $log10(sig8 / noi8[f]));
    checks++;
    if (smax[0] - smin[0] < 1.0 && smax[1] - smin[1] < 1.0 && smax[2] - smin[2] < 1.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (NS + 10) + 1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
