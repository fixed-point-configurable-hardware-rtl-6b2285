// tb_iir_cell - one second-order cell in each of the three structures and
// a third-order transposed cell, driven with the same random samples
// (with idle cycles in which en is low), plus a single eighth-order
// direct-form-II cell with 24-bit coefficients (the word length the
// document finds for an uncascaded 8th-order filter) and a 48-bit
// accumulator. Every output is compared with the
// bit-accurate reference model; the state must hold while en is low.
module tb_iir_cell;
  import fxp_pkg::*;
  import iir_ref_pkg::*;
  localparam int BS = 16, FS = 13, BC = 13, FC = 11, BA = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en;
  logic signed [BS-1:0] x, y [4];
  logic signed [BC-1:0] b2 [3], a2 [2], b3 [4], a3 [3];
  logic signed [23:0]   b8 [9], a8 [8];
  logic signed [BS-1:0] y8;

  iir_cell #(.ORDER(2), .FORM(IIR_DF1))  u_df1 (.clk, .rst_n, .en, .x, .b(b2), .a(a2), .y(y[0]));
  iir_cell #(.ORDER(2), .FORM(IIR_DF2))  u_df2 (.clk, .rst_n, .en, .x, .b(b2), .a(a2), .y(y[1]));
  iir_cell #(.ORDER(2), .FORM(IIR_TDF2)) u_tf2 (.clk, .rst_n, .en, .x, .b(b2), .a(a2), .y(y[2]));
  iir_cell #(.ORDER(3), .FORM(IIR_TDF2)) u_tf3 (.clk, .rst_n, .en, .x, .b(b3), .a(a3), .y(y[3]));

  iir_cell #(.ORDER(8), .FORM(IIR_DF2), .BC(24), .FC(20), .BA(48)) u_df8 (
    .clk, .rst_n, .en, .x, .b(b8), .a(a8), .y(y8));

  iir_fx_ref m [4];
  iir_fx_ref m8;

  initial begin
    // poles at radius 0.9, angle 45 degrees; coefficients in Q1.11
    b2 = '{13'sd410, 13'sd819, 13'sd410};
    a2 = '{-13'sd2607, 13'sd1659};
    // third order: (second-order above) times (1 - 0.5 z^-1) pole
    b3 = '{13'sd300, 13'sd600, 13'sd600, 13'sd300};
    a3 = '{-13'sd3631, 13'sd2963, -13'sd829};
    for (int i = 0; i < 3; i++) begin
      m[i] = new(i, 2, BS, FC, BA);
      foreach (b2[k]) m[i].b[k] = longint'(b2[k]);
      foreach (a2[k]) m[i].a[k] = longint'(a2[k]);
    end
    m[3] = new(2, 3, BS, FC, BA);
    foreach (b3[k]) m[3].b[k] = longint'(b3[k]);
    foreach (a3[k]) m[3].a[k] = longint'(a3[k]);
    // eighth order: four second-order sections multiplied out
    begin
      real pa [9], pb [9], rr, th;
      for (int k = 0; k < 9; k++) begin pa[k] = 0.0; pb[k] = 0.0; end
      pa[0] = 1.0; pb[0] = 1.0;
      for (int c = 0; c < 4; c++) begin
        real na [9], nb [9], s1, s2;
        rr = 0.5 + 0.1 * c; th = 0.4 + 0.6 * c;
        s1 = -2.0 * rr * $cos(th); s2 = rr * rr;
        for (int k = 0; k < 9; k++) begin
          na[k] = pa[k]; nb[k] = pb[k];
          if (k >= 1) begin na[k] += s1 * pa[k-1]; nb[k] += 0.0 * pb[k-1]; end
          if (k >= 2) begin na[k] += s2 * pa[k-2]; nb[k] -= pb[k-2]; end
        end
        for (int k = 0; k < 9; k++) begin pa[k] = na[k]; pb[k] = nb[k] * 0.5; end
      end
      for (int k = 0; k < 9; k++) b8[k] = 24'($rtoi(pb[k] * 1048576.0));
      for (int k = 0; k < 8; k++) a8[k] = 24'($rtoi(pa[k+1] * 1048576.0));
      m8 = new(1, 8, BS, 20, 48);
      for (int k = 0; k < 9; k++) m8.b[k] = longint'(b8[k]);
      for (int k = 0; k < 8; k++) m8.a[k] = longint'(a8[k]);
    end
    en = 0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      x = BS'(int'($urandom_range(8191)) - 4096);   // |x| < 0.5
      #1;
      if (en) begin
        longint e8;
        e8 = m8.step(longint'(x));
        checks++;
        if (longint'(y8) != e8) begin
          failures++;
          if (failures < 10) $display("order-8 cell n=%0d: y=%0d expected %0d", n, y8, e8);
        end
      end
      for (int i = 0; i < 4; i++) begin
        longint ey;
        if (en) ey = m[i].step(longint'(x));
        if (en) begin
          checks++;
          if (longint'(y[i]) != ey) begin
            failures++;
            if (failures < 10) $display("cell %0d n=%0d: y=%0d expected %0d", i, n, y[i], ey);
          end
        end
      end
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
