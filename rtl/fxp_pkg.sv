// fxp_pkg - shared fixed-point types and helpers for the configurable
// fixed-point IP blocks (LMS/DLMS adaptive filter and cascaded IIR filter).
//
// A fixed-point value is a two's-complement word of b bits: one sign bit,
// m integer bits and n fractional bits, b = 1 + m + n, so its weight is
// 2^-n. The binary point of each datum is a parameter (its number of
// fractional bits, called F... in the modules); the integer part follows
// from the word length. All arithmetic is done on a 64-bit signed
// intermediate and then brought back to a narrower format by requant():
// the dropped low-order bits are eliminated by truncation (floor), which
// is the quantization the analytical noise model assumes (to_fmt_rnd
// rounds instead, for the one place where a biased error would build up),
// and the result is wrapped to the target word length. No saturation is done: the binary
// points are meant to be chosen from the dynamic range so that no overflow
// occurs. Word lengths up to 32 bits are supported, which keeps every
// product of two operands inside the 64-bit intermediate.
package fxp_pkg;

  typedef logic signed [63:0] wide_t;

  // Largest word length any operator in these blocks may be given.
  localparam int unsigned MAX_W = 32;

  // Move a value from f_in to f_out fractional bits. A positive shift
  // drops bits by truncation toward minus infinity, a negative one appends
  // zeros. The caller keeps the low bits it needs (wrap-around).
  function automatic wide_t requant(input wide_t v, input int f_in, input int f_out);
    int sh;
    sh = f_in - f_out;
    if (sh >= 0) return v >>> sh;
    else return v <<< (-sh);
  endfunction

  // Sign-extend the low w bits of v to the full intermediate width.
  function automatic wide_t sext(input wide_t v, input int unsigned w);
    wide_t m;
    m = wide_t'(1) <<< (w - 1);
    v = v & ((m <<< 1) - 1);
    return (v ^ m) - m;
  endfunction

  // Quantize and wrap to a w-bit word with f_out fractional bits.
  function automatic wide_t to_fmt(input wide_t v, input int f_in, input int f_out,
                                   input int unsigned w);
    return sext(requant(v, f_in, f_out), w);
  endfunction

  // As to_fmt, but rounding to nearest (ties toward plus infinity): half an
  // output LSB is added before the truncation. Used where a truncation bias
  // would accumulate, i.e. in the LMS weight update.
  function automatic wide_t to_fmt_rnd(input wide_t v, input int f_in, input int f_out,
                                       input int unsigned w);
    if (f_in > f_out) v = v + (wide_t'(1) <<< (f_in - f_out - 1));
    return sext(requant(v, f_in, f_out), w);
  endfunction

  // Number of register stages of a pipelined adder tree of k inputs when
  // l_add two-input additions fit in one clock cycle:
  // M_ADD = ceil(log2(K) / L_ADD).
  function automatic int unsigned tree_stages(input int unsigned k, input int unsigned l_add);
    int unsigned lv;
    lv = $clog2(k);
    return (lv + l_add - 1) / l_add;
  endfunction

  // Tag that travels with a group of K values down the LMS filter
  // pipeline: valid data, first group of a sample (the accumulator
  // restarts) and last group (the accumulator then holds the output).
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } grp_tag_t;

  // Structures of a cascaded IIR cell.
  typedef enum logic [1:0] {
    IIR_DF1  = 2'd0,   // direct form I
    IIR_DF2  = 2'd1,   // direct form II
    IIR_TDF2 = 2'd2    // transposed direct form II
  } iir_form_e;

endpackage
