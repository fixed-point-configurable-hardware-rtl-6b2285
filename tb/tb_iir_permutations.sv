// tb_iir_permutations - the cell-permutation sweep of an 8th-order IIR
// filter made of four second-order cells. For each of the 24 orders in
// which the four sections can be cascaded, and for each of the three
// structures, the IP is reset, loaded with the permuted coefficients and
// fed 1500 random samples. Every output is compared bit for bit with the
// chained reference models, and the SQNR against a double-precision
// cascade is measured. The sweep reports the SQNR range of each structure
// and checks that it does depend on the permutation (spread above 1 dB).
// A fourth instance runs direct form II with every cell at 11 fractional
// bits (FS_CELL), two integer bits more than the default: its worst
// permutation must gain at least 10 dB over the default format, whose
// internal state wraps for the orders that put high-gain sections first.
module tb_iir_permutations;
  import fxp_pkg::*;
  import iir_ref_pkg::*;
  localparam int BS = 16, BC = 13, FC = 11, BA = 32, NC = 4, NS = 1500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic x_valid;
  logic signed [BS-1:0] x_in, y_out [4];
  logic y_valid [4];
  logic signed [BC-1:0] bq [NC][3], aq [NC][2];

  iir_cascade #(.FORM(IIR_DF1))  u0 (.clk, .rst_n, .x_valid, .x_in, .b_coef(bq), .a_coef(aq),
                                     .y_valid(y_valid[0]), .y_out(y_out[0]));
  iir_cascade #(.FORM(IIR_DF2))  u1 (.clk, .rst_n, .x_valid, .x_in, .b_coef(bq), .a_coef(aq),
                                     .y_valid(y_valid[1]), .y_out(y_out[1]));
  iir_cascade #(.FORM(IIR_TDF2)) u2 (.clk, .rst_n, .x_valid, .x_in, .b_coef(bq), .a_coef(aq),
                                     .y_valid(y_valid[2]), .y_out(y_out[2]));
  localparam int FS = 13, FSW = 11;
  localparam int FSC [NC] = '{default: FSW};
  iir_cascade #(.FORM(IIR_DF2), .FS_CELL(FSC)) u3 (.clk, .rst_n, .x_valid, .x_in, .b_coef(bq),
                                     .a_coef(aq), .y_valid(y_valid[3]), .y_out(y_out[3]));

  // the four sections, in Q1.11
  logic signed [BC-1:0] sb [NC][3], sa [NC][2];
  iir_fx_ref fx [4][NC];
  iir_fl_ref fl [NC];
  real smin [4], smax [4];

  initial begin
    real rr [NC], th [NC];
    int perm [NC];

    rr = '{0.55, 0.7, 0.85, 0.93};
    th = '{0.3, 0.9, 1.6, 2.4};
    for (int c = 0; c < NC; c++) begin
      sb[c][0] = BC'($rtoi((1.0 - rr[c]) * 2048.0));
      sb[c][1] = '0;
      sb[c][2] = -sb[c][0];
      sa[c][0] = BC'($rtoi(-2.0 * rr[c] * $cos(th[c]) * 2048.0));
      sa[c][1] = BC'($rtoi(rr[c] * rr[c] * 2048.0));
    end
    for (int f = 0; f < 4; f++) begin smin[f] = 1000.0; smax[f] = -1000.0; end
    x_valid = 0; x_in = '0;
    for (int p0 = 0; p0 < NC; p0++) for (int p1 = 0; p1 < NC; p1++)
    for (int p2 = 0; p2 < NC; p2++) for (int p3 = 0; p3 < NC; p3++) begin
      if (p0 != p1 && p0 != p2 && p0 != p3 && p1 != p2 && p1 != p3 && p2 != p3) begin
        real sig_p, noise_p [4];
        longint ey [4];
        logic vq;
        perm = '{p0, p1, p2, p3};

        // load the permutation and restart the filters
        @(negedge clk);
        rst_n = 0;
        for (int c = 0; c < NC; c++) begin
          bq[c] = sb[perm[c]];
          aq[c] = sa[perm[c]];
          for (int f = 0; f < 4; f++) begin
            fx[f][c] = new((f == 3) ? 1 : f, 2, BS, FC, BA);
            for (int k = 0; k < 3; k++) fx[f][c].b[k] = longint'(bq[c][k]);
            for (int k = 0; k < 2; k++) fx[f][c].a[k] = longint'(aq[c][k]);
          end
          fl[c] = new(2);
          for (int k = 0; k < 3; k++) fl[c].b[k] = real'(bq[c][k]) / 2048.0;
          for (int k = 0; k < 2; k++) fl[c].a[k] = real'(aq[c][k]) / 2048.0;
        end
        @(negedge clk);
        rst_n = 1;
        sig_p = 0.0;
        for (int f = 0; f < 4; f++) noise_p[f] = 0.0;
        vq = 0;
        for (int n = 0; n < NS; n++) begin
          real yr;
          @(negedge clk);
          if (vq) for (int f = 0; f < 4; f++) begin
            checks++;
            if (longint'(y_out[f]) != ey[f] || !y_valid[f]) begin
              failures++;
              if (failures < 10) $display("order %0d%0d%0d%0d form %0d: %0d expected %0d", perm[0], perm[1], perm[2], perm[3], f, y_out[f], ey[f]);
            end
          end
          x_valid = 1;
          x_in = BS'(int'($urandom_range(16383)) - 8192);   // |x| < 1
          vq = 1;
          for (int f = 0; f < 3; f++) begin
            ey[f] = longint'(x_in);
            for (int c = 0; c < NC; c++) ey[f] = fx[f][c].step(ey[f]);
          end
          ey[3] = longint'(x_in) >>> (FS - FSW);
          for (int c = 0; c < NC; c++) ey[3] = fx[3][c].step(ey[3]);
          ey[3] = wrapb(ey[3] <<< (FS - FSW), BS);
          yr = real'(x_in) / 8192.0;
          for (int c = 0; c < NC; c++) yr = fl[c].step(yr);
          sig_p += yr * yr;
          for (int f = 0; f < 4; f++) noise_p[f] += (real'(ey[f]) / 8192.0 - yr) ** 2;
        end
        @(negedge clk);
        x_valid = 0;
        for (int f = 0; f < 4; f++) begin
          real sq;
          sq = 10.0 * $log10(sig_p / noise_p[f]);
          if (sq < smin[f]) smin[f] = sq;
          if (sq > smax[f]) smax[f] = sq;
        end
      end
    end
    // every one of the 24 permutations must have produced NS-1 compared outputs
    checks++;
    if (checks != 24 * 4 * (NS - 1) + 1) failures++;
    for (int f = 0; f < 3; f++) begin
      $display("structure %0d (0 DF1, 1 DF2, 2 TDF2): SQNR over %0d permutations %0.1f .. %0.1f dB",
               f, checks / (4 * (NS - 1)), smin[f], smax[f]);
      checks++;
      if (smax[f] - smin[f] < 1.0) failures++;
    end
    $display("direct form II with %0d fractional bits in every cell: %0.1f .. %0.1f dB",
             FSW, smin[3], smax[3]);
    checks++;
    if (smin[3] < smin[1] + 10.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (24 * (NS + 10) + 1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
