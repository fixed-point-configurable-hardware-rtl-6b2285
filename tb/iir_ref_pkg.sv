// iir_ref_pkg - reference models for the IIR testbenches.
//   iir_fx_ref : bit-accurate model of one fixed-point cell, written from
//                the difference equations of each structure with the
//                quantization rules of the design (products exact, sums
//                wrapped to BA bits, truncation to the signal format
//                wherever a value is stored or output).
//   iir_fl_ref : the same cell in double precision, used to measure the
//                signal-to-quantization-noise ratio of the fixed-point IP.
package iir_ref_pkg;

  function automatic longint wrapb(longint v, int b);
    v = v & ((longint'(1) << b) - 1);
    if (v >= (longint'(1) << (b - 1))) v -= (longint'(1) << b);
    return v;
  endfunction

  class iir_fx_ref;
    int form;            // 0 DF1, 1 DF2, 2 TDF2
    int r, bs, fc, ba;
    longint b [], a [];  // b[0..r], a[0..r-1] = a1..ar
    longint xd [], yd [];

    function new(int form, int r, int bs, int fc, int ba);
      this.form = form; this.r = r; this.bs = bs; this.fc = fc; this.ba = ba;
      b = new[r + 1]; a = new[r];
      xd = new[r]; yd = new[r];
      foreach (xd[k]) begin xd[k] = 0; yd[k] = 0; end
    endfunction

    function longint q(longint acc);
      return wrapb(wrapb(acc, ba) >>> fc, bs);
    endfunction

    function longint step(longint x);
      longint acc, accw, w, y;
      longint nx [];
      nx = new[r];
      case (form)
        0: begin
          acc = b[0] * x;
          for (int k = 0; k < r; k++) acc += b[k+1] * xd[k] - a[k] * yd[k];
          y = q(acc);
          for (int k = r - 1; k > 0; k--) begin xd[k] = xd[k-1]; yd[k] = yd[k-1]; end
          xd[0] = x; yd[0] = y;
        end
        1: begin
          accw = x <<< fc;
          for (int k = 0; k < r; k++) accw -= a[k] * xd[k];
          w = q(accw);
          acc = b[0] * w;
          for (int k = 0; k < r; k++) acc += b[k+1] * xd[k];
          y = q(acc);
          for (int k = r - 1; k > 0; k--) xd[k] = xd[k-1];
          xd[0] = w;
        end
        default: begin
          y = q(b[0] * x + (xd[0] <<< fc));
          for (int k = 0; k < r; k++)
            nx[k] = q(b[k+1] * x - a[k] * y + ((k + 1 < r) ? (xd[k+1] <<< fc) : 0));
          for (int k = 0; k < r; k++) xd[k] = nx[k];
        end
      endcase
      return y;
    endfunction
  endclass

  class iir_fl_ref;
    int r;
    real b [], a [], xd [], yd [];
    function new(int r);
      this.r = r;
      b = new[r + 1]; a = new[r]; xd = new[r]; yd = new[r];
      foreach (xd[k]) begin xd[k] = 0.0; yd[k] = 0.0; end
    endfunction
    function real step(real x);
      real y;
      y = b[0] * x;
      for (int k = 0; k < r; k++) y += b[k+1] * xd[k] - a[k] * yd[k];
      for (int k = r - 1; k > 0; k--) begin xd[k] = xd[k-1]; yd[k] = yd[k-1]; end
      xd[0] = x; yd[0] = y;
      return y;
    endfunction
  endclass

endpackage
