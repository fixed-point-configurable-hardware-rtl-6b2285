// tb_iir_cascade - an 8th-order filter of four second-order cells, built
// in all three structures from the same 13-bit coefficients. Random
// samples with idle cycles; every output must match the chained
// bit-accurate cell models one cycle after its input, and the measured
// signal-to-quantization-noise ratio against a double-precision filter
// with the same coefficients must exceed 30 dB, and be lower for the
// transposed form II than for direct form I, whose stored adder outputs
// add a noise source (the document reports 7 dB for second-order cells).
// A cascade of two
// fourth-order cells is run as well, and a transposed-form cascade whose
// cells use different binary points (FS_CELL = 14, 13, 12, 13 fractional
// bits), so that the scaling steps between cells are exercised in both
// directions. Finally a direct-form-I cascade with 26-bit signals (23
// fractional bits) and a 48-bit accumulator must reach an SQNR of 90 dB.
module tb_iir_cascade;
  import fxp_pkg::*;
  import iir_ref_pkg::*;
  localparam int BS = 16, FS = 13, BC = 13, FC = 11, BA = 32, NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic x_valid;
  logic signed [BS-1:0] x_in, y_out [5];
  logic y_valid [5];
  logic signed [BC-1:0] bq [NC][3], aq [NC][2];
  logic signed [14:0]   b4 [2][5], a4 [2][4];   // 15-bit coefficients of fourth-order cells

  iir_cascade #(.FORM(IIR_DF1))  u0 (.clk, .rst_n, .x_valid, .x_in, .b_coef(bq), .a_coef(aq),
                                     .y_valid(y_valid[0]), .y_out(y_out[0]));
  iir_cascade #(.FORM(IIR_DF2))  u1 (.clk, .rst_n, .x_valid, .x_in, .b_coef(bq), .a_coef(aq),
                                     .y_valid(y_valid[1]), .y_out(y_out[1]));
  iir_cascade #(.FORM(IIR_TDF2)) u2 (.clk, .rst_n, .x_valid, .x_in, .b_coef(bq), .a_coef(aq),
                                     .y_valid(y_valid[2]), .y_out(y_out[2]));
  iir_cascade #(.CELL_ORDER(4), .BC(15), .FC(11), .FORM(IIR_DF2)) u3 (.clk, .rst_n, .x_valid, .x_in,
                                     .b_coef(b4), .a_coef(a4), .y_valid(y_valid[3]), .y_out(y_out[3]));
  localparam int FSC [NC] = '{14, 13, 12, 13};
  iir_cascade #(.FORM(IIR_TDF2), .FS_CELL(FSC)) u4 (.clk, .rst_n, .x_valid, .x_in, .b_coef(bq),
                                     .a_coef(aq), .y_valid(y_valid[4]), .y_out(y_out[4]));

  localparam int BSW = 26, FSW = 23, BAW = 48;
  logic signed [BSW-1:0] xw, yw;
  logic ywv;
  assign xw = BSW'(x_in) <<< (FSW - FS);
  iir_cascade #(.FORM(IIR_DF1), .BS(BSW), .FS(FSW), .BA(BAW)) u5 (.clk, .rst_n, .x_valid,
    .x_in(xw), .b_coef(bq), .a_coef(aq), .y_valid(ywv), .y_out(yw));
  iir_fx_ref fxw [NC];
  longint eyw;
  real noise_w;

  iir_fx_ref fx [5][NC];
  iir_fl_ref fl [NC];
  real sig_p [5], noise_p [5];

  real sqnr [5];

  // move a BS-bit value from fi to fo fractional bits: floor, then wrap
  function automatic longint rescale(longint v, int fi, int fo);
    return wrapb((fi >= fo) ? (v >>> (fi - fo)) : (v <<< (fo - fi)), BS);
  endfunction

  initial begin
    real rr [NC], th [NC];
    longint ey [5];
    logic    vq;
    rr = '{0.5, 0.7, 0.8, 0.9};
    th = '{0.35, 1.05, 1.75, 2.45};
    for (int c = 0; c < NC; c++) begin
      real g;
      g = 1.0 - rr[c];
      bq[c][0] = BC'($rtoi(g * 2048.0));
      bq[c][1] = '0;
      bq[c][2] = -bq[c][0];
      aq[c][0] = BC'($rtoi(-2.0 * rr[c] * $cos(th[c]) * 2048.0));
      aq[c][1] = BC'($rtoi(rr[c] * rr[c] * 2048.0));
      for (int f = 0; f < 5; f++) if (f != 3) begin
        fx[f][c] = new((f == 4) ? 2 : f, 2, BS, FC, BA);
        foreach (bq[c][k]) fx[f][c].b[k] = longint'(bq[c][k]);
        foreach (aq[c][k]) fx[f][c].a[k] = longint'(aq[c][k]);
      end
      fxw[c] = new(0, 2, BSW, FC, BAW);
      foreach (bq[c][k]) fxw[c].b[k] = longint'(bq[c][k]);
      foreach (aq[c][k]) fxw[c].a[k] = longint'(aq[c][k]);
      fl[c] = new(2);
      foreach (bq[c][k]) fl[c].b[k] = real'(bq[c][k]) / 2048.0;
      foreach (aq[c][k]) fl[c].a[k] = real'(aq[c][k]) / 2048.0;
    end
    // fourth-order cells: products of cell pairs (0,1) and (2,3)
    for (int p = 0; p < 2; p++) begin
      longint bb [5], aa [5];
      longint a1 [3], a2v [3], b1 [3], b2v [3];
      a1  = '{2048, longint'(aq[2*p][0]), longint'(aq[2*p][1])};
      a2v = '{2048, longint'(aq[2*p+1][0]), longint'(aq[2*p+1][1])};
      b1  = '{longint'(bq[2*p][0]), 0, longint'(bq[2*p][2])};
      b2v = '{longint'(bq[2*p+1][0]), 0, longint'(bq[2*p+1][2])};
      for (int k = 0; k < 5; k++) begin bb[k] = 0; aa[k] = 0; end
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
        bb[i+j] += b1[i] * b2v[j];
        aa[i+j] += a1[i] * a2v[j];
      end
      for (int k = 0; k < 5; k++) b4[p][k] = 15'(bb[k] >>> 11);
      for (int k = 0; k < 4; k++) a4[p][k] = 15'(aa[k+1] >>> 11);
      fx[3][p] = new(1, 4, BS, FC, BA);
      for (int k = 0; k < 5; k++) fx[3][p].b[k] = longint'(b4[p][k]);
      for (int k = 0; k < 4; k++) fx[3][p].a[k] = longint'(a4[p][k]);
    end
    for (int f = 0; f < 5; f++) begin sig_p[f] = 0.0; noise_p[f] = 0.0; end
    noise_w = 0.0;
    x_valid = 0; x_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    vq = 0;
    for (int n = 0; n < 3000; n++) begin
      real yr;
      @(negedge clk);
      // check the outputs of the previous cycle's sample
      for (int f = 0; f < 5; f++) begin
        checks++;
        if (y_valid[f] != vq) failures++;
        if (vq) begin
          checks++;
          if (longint'(y_out[f]) != ey[f]) begin
            failures++;
            if (failures < 10) $display("form %0d n=%0d: %0d expected %0d", f, n, y_out[f], ey[f]);
          end
        end
      end
      checks++;
      if (ywv != vq) failures++;
      if (vq) begin
        checks++;
        if (longint'(yw) != eyw) failures++;
      end
      x_valid = ($urandom_range(5) != 0);
      x_in = BS'(int'($urandom_range(8191)) - 4096);
      vq = x_valid;
      if (x_valid) begin
        for (int f = 0; f < 4; f++) begin
          ey[f] = longint'(x_in);
          for (int c = 0; c < ((f == 3) ? 2 : NC); c++) ey[f] = fx[f][c].step(ey[f]);
        end
        eyw = longint'(x_in) <<< (FSW - FS);
        for (int c = 0; c < NC; c++) eyw = fxw[c].step(eyw);
        // per-cell binary points: scale into each cell and back out
        ey[4] = rescale(longint'(x_in), FS, FSC[0]);
        for (int c = 0; c < NC; c++)
          ey[4] = rescale(fx[4][c].step(ey[4]), FSC[c], (c + 1 < NC) ? FSC[c+1] : FS);
        yr = real'(x_in) / 8192.0;
        for (int c = 0; c < NC; c++) yr = fl[c].step(yr);
        noise_w += (real'(eyw) / 2.0 ** FSW - yr) ** 2;
        for (int f = 0; f < 5; f++) if (f != 3) begin
          sig_p[f]   += yr * yr;
          noise_p[f] += (real'(ey[f]) / 8192.0 - yr) ** 2;
        end
      end
    end
    for (int f = 0; f < 5; f++) if (f != 3) begin
      real sq;
      sq = 10.0 * $log10(sig_p[f] / noise_p[f]);
      sqnr[f] = sq;
      $display("structure %0d: SQNR %0.1f dB", f, sq);
      checks++;
      if (sq < 30.0) failures++;
    end
    checks++;
    if (!(sqnr[2] < sqnr[0])) failures++;
    $display("direct form I, 26-bit signals: SQNR %0.1f dB", 10.0 * $log10(sig_p[0] / noise_w));
    checks++;
    if (10.0 * $log10(sig_p[0] / noise_w) < 90.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
