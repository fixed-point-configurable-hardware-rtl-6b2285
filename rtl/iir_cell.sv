// iir_cell - one fixed-point cell of a cascaded IIR filter IP.
//
// Computes one section of order R = ORDER,
//   H(z) = (b0 + b1 z^-1 + ... + bR z^-R) / (1 + a1 z^-1 + ... + aR z^-R),
// in one of the three structures the IP can be generated with (FORM):
//   IIR_DF1  direct form I: 2R delayed values (R inputs, R outputs) are
//            stored; one accumulation gives y.
//   IIR_DF2  direct form II: R delayed values of the internal signal
//            w(n) = x(n) - sum a_k w(n-k) are stored; y = sum b_k w(n-k).
//   IIR_TDF2 transposed form II: R adder outputs s_k are stored,
//            y = b0 x + s_1, s_k <= b_k x - a_k y + s_{k+1}.
// Fixed-point: signals (x, y, w and stored values) are BS bits with FS
// fractional bits, coefficients BC bits with FC fractional bits.
// Products are exact; sums are formed in a BA-bit accumulator (wrapping)
// with FS+FC fractional bits and truncated back to the signal format
// wherever a value is stored or leaves the cell - for the transposed form
// that includes every stored adder output, the extra noise source that
// sets it apart from direct form I.
//
// Interface: y is combinational from x and the stored state; the state
// advances at the clock edge when en is high (one sample per enable).
// The three structures and the coefficient word length (13 bits for
// second-order cells) follow the document; the formats of the signals,
// the coefficient binary point and the one-sample-per-cycle datapath are
// this design's choices.
module iir_cell
  import fxp_pkg::*;
#(
  parameter int unsigned ORDER = 2,
  parameter iir_form_e   FORM  = IIR_TDF2,
  parameter int unsigned BS    = 16, parameter int FS = 13,
  parameter int unsigned BC    = 13, parameter int FC = 11,
  parameter int unsigned BA    = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [BS-1:0] x,
  input  logic signed [BC-1:0] b [ORDER+1],  // b0 .. bR
  input  logic signed [BC-1:0] a [ORDER],    // a1 .. aR
  output logic signed [BS-1:0] y
);
  localparam int FA = FS + FC;   // fractional bits of a product / sum

  initial assert (BS <= MAX_W && BC <= MAX_W && BA <= 62 && BA >= BS + BC)
    else $error("iir_cell: unsupported word lengths");

  // Stored values: index k holds the value delayed by k+1 samples
  // (DF1: inputs in xd, outputs in yd; DF2: w in xd; TDF2: s_{k+1} in xd).
  logic signed [BS-1:0] xd [ORDER];
  logic signed [BS-1:0] yd [ORDER];
  logic signed [BS-1:0] nxt [ORDER];  // value written to xd at en
  logic signed [BS-1:0] w;

  function automatic wide_t mul(input logic signed [BC-1:0] c, input logic signed [BS-1:0] s);
    return wide_t'(c) * wide_t'(s);
  endfunction

  always_comb begin
    wide_t acc, accw;
    y   = '0;
    w   = '0;
    for (int k = 0; k < ORDER; k++) nxt[k] = '0;
    unique case (FORM)
      IIR_DF1: begin
        acc = mul(b[0], x);
        for (int k = 0; k < ORDER; k++)
          acc = sext(acc + mul(b[k+1], xd[k]) - mul(a[k], yd[k]), BA);
        y = BS'(to_fmt(acc, FA, FS, BS));
        nxt[0] = x;
        for (int k = 1; k < ORDER; k++) nxt[k] = xd[k-1];
      end
      IIR_DF2: begin
        accw = wide_t'(x) <<< FC;
        for (int k = 0; k < ORDER; k++)
          accw = sext(accw - mul(a[k], xd[k]), BA);
        w   = BS'(to_fmt(accw, FA, FS, BS));
        acc = mul(b[0], w);
        for (int k = 0; k < ORDER; k++)
          acc = sext(acc + mul(b[k+1], xd[k]), BA);
        y = BS'(to_fmt(acc, FA, FS, BS));
        nxt[0] = w;
        for (int k = 1; k < ORDER; k++) nxt[k] = xd[k-1];
      end
      default: begin  // IIR_TDF2
        acc = sext(mul(b[0], x) + (wide_t'(xd[0]) <<< FC), BA);
        y   = BS'(to_fmt(acc, FA, FS, BS));
        for (int k = 0; k < ORDER; k++) begin
          accw = mul(b[k+1], x) - mul(a[k], y);
          if (k + 1 < ORDER) accw = accw + (wide_t'(xd[k+1]) <<< FC);
          nxt[k] = BS'(to_fmt(sext(accw, BA), FA, FS, BS));
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) begin
        xd[k] <= '0;
        yd[k] <= '0;
      end
    end else if (en) begin
      for (int k = 0; k < ORDER; k++) xd[k] <= nxt[k];
      yd[0] <= y;
      for (int k = 1; k < ORDER; k++) yd[k] <= yd[k-1];
    end
  end
endmodule
