# Accuracy-configurable fixed-point filter IPs

Most DSP IP cores let you set the input and output word lengths, and
nothing more. This design goes further. Every internal datum has its own
word length and binary point: samples, coefficients, products, sums and
stored states. Each of these is a parameter. A design-space tool (not
included) picks the cheapest set of word lengths that still meets an
accuracy target, stated as an SQNR (signal-to-quantization-noise ratio).
It also picks the parallelism that meets a throughput target, and the
algorithmic structure. The RTL here is the generic architecture that such
a tool configures, for two applications:

* **`lms_dlms_ip`**: an LMS or delayed-LMS adaptive FIR filter with N
  taps, computed K taps per cycle.
* **`iir_cascade`**: an IIR filter built as a cascade of cells. The
  cells can be in direct form I, direct form II or transposed form II,
  with a selectable cell order.

`fxp_ip_top` places the two side by side. They share only clock and
reset.

## Fixed-point conventions (`fxp_pkg`)

A value of word length `b` is a two's-complement word. It holds one sign
bit, `m` integer bits and `n` fractional bits, so `b = 1 + m + n`. The
integer part follows from the dynamic range: `m = ceil(log2(max|x|))`. In
the parameters, each datum has a word length `B*` and a fractional-bit
count `F*`.

* Products are formed exactly on a 64-bit intermediate.
* Moving a value to a format with fewer fractional bits truncates
  (floor) the dropped bits. This is the cast that the analytical noise
  model treats as a uniform white noise source.
* One cast rounds to nearest instead: the LMS weight increment
  `mu·x·e`. A floor there would add −½ LSB to every weight at every
  sample. Through the feedback of the adaptation, the weights then settle
  visibly off the ideal solution. At the default formats, the output
  SQNR against a double-precision LMS is about 8 dB with truncation and
  about 44 dB with rounding. Rounding costs one adder input per lane.
* Results wrap to the target word length, and nothing saturates. The
  binary points are meant to be chosen from the dynamic range, so
  overflow does not occur in intended use. If you shrink an integer
  part, watch for wrap-around.

`requant`, `sext`, `to_fmt` and `to_fmt_rnd` in `fxp_pkg` implement
these rules. They are used everywhere a format changes.

## The LMS / DLMS IP

### Algorithm

```
yhat(n) = w_n^T x_n
e(n)    = y(n) - yhat(n)
w_{n+1} = w_n + mu * x_{n-D} * e(n-D)      D = 0: LMS, D > 0: delayed LMS
```

The step is `mu = 2^-MU_SHIFT`, applied as a shift. In the delayed LMS,
the regressor is delayed together with the error. This is the standard
DLMS. If the current `x_n` were paired with a stale error, the weights
would not converge for white input.

### Datapath

The N taps are processed in `P = ceil(N/K)` groups of K. When K does not
divide N, the missing lanes of the last group read zeros and are never
written.

```
 data memory ──► K multipliers ─reg─► adder tree (M_ADD stages) ─► accumulator ─reg─► yhat
 (N+D words)        (b_x*b_h→b_m)       (b_m→b_o scaling, b_o)       (b_o)              │
      │                  ▲                                                             ▼
      │           coefficient memory ◄── K adders ◄─reg── K multipliers ◄─ e ◄─reg─ y − yhat
      └──────────────────────────────────────────────► (x·e·mu → b_h)
```

| module | role | pipeline |
|---|---|---|
| `lms_data_mem` | circular buffer of the last N+D samples. One port serves filter taps x(n−i), the other serves adaptation taps x(n−i−D). | combinational read, push at the clock edge |
| `lms_coef_mem` | N weights. Ports: a filter read group, an adaptation read group, a group write-back, and a single-word observation port. | combinational read, write at the clock edge |
| `lms_filter_mult` | K multipliers, each product truncated to `BM/FM` | 1 stage |
| `lms_adder_tree` | ceil(log2 K) adder levels, with `L_ADD` levels chained per cycle | `M_ADD = ceil(log2 K / L_ADD)` stages |
| `lms_accumulator` | sums the P group results of one sample | 1 stage |
| `lms_error` | subtracter. For D > 0 it also holds a D-deep error delay line. | 1 stage |
| `lms_adapt_mad` | K multiply-add units computing `h + trunc(x·e·2^-MU)` | 2 stages |
| `lms_ctrl` | FSM: IDLE, FILT, WAIT, ADAPT | — |

A 3-bit tag (valid, first group, last group) travels alongside the data.
The accumulator uses it to restart on a new sample and to flag the final
sum, so there is no counter in the datapath.

### Schedule and throughput

In cycles, with P groups:

* Filter part: `T_FIR = P + M_ADD + 1`, covering the multiplier stage, the
  tree and the final accumulation. `yhat_valid` comes `T_FIR + 1` cycles
  after the sample is accepted.
* Adaptation part: `T_Adapt = P + 2`, covering the subtraction, P
  multiply groups and the final add.
* **LMS (D = 0):** adaptation must wait for e(n), so the two parts run one
  after the other. The sample period is `T_FIR + T_Adapt = 2P + M_ADD + 3`.
  The next sample is accepted during the last multiply-add cycle.
* **DLMS (D > 0):** the update uses an error that already exists, so
  adaptation group g runs in the same cycle as filter group g. A group's
  weights are written one cycle after the filter has read them, so the
  filter always sees w_n. The sample period is `T_FIR + 1 = P + M_ADD + 2`.
  The next sample is accepted in the cycle when yhat arrives. The one
  cycle beyond `T_FIR` is the error subtraction: with D = 1, the first
  update of the next sample already needs e(n).

At the defaults (N = 128, K = 4, L_ADD = 1), `P = 32` and `M_ADD = 2`.
The sample period is 69 cycles for the LMS and 36 cycles for the DLMS.
To meet a sampling-period constraint `T_e`, choose K so that this cycle
count times the clock period stays below `T_e`.

### Interface

The input uses a ready/valid handshake. A sample `(x_in, y_in)` is taken
in the cycle when `x_valid && x_ready`. Later outputs:

* `yhat` is valid together with a one-cycle `yhat_valid` pulse.
* `err` follows one cycle later, with `err_valid`.
* `coef_addr` / `coef_data` read any weight at any time.

Reset is asynchronous and active low. It clears both memories, so the
filter starts from zero history and zero weights. For the first D
samples, the DLMS uses a zero error.

### Defaults

| parameter | default | meaning |
|---|---|---|
| `N` | 128 | taps |
| `K` | 4 | parallelism (multipliers and multiply-add units) |
| `BX/FX` | 16/15 | input samples |
| `BH/FH` | 16/15 | coefficients |
| `BM/FM` | 32/30 | filter products (full 16×16 product) |
| `BO/FO` | 32/24 | tree, accumulator, reference y and error (7 integer bits for 128 terms) |
| `L_ADD` | 1 | adder levels per clock cycle |
| `MU_SHIFT` | 6 | mu = 1/64, stable for full-scale white input at N = 128 |
| `DELAY` | 0 | D; 0 selects the LMS |

The word lengths are the conventional 16×16→32 multiply, 32-bit add
implementation. An accuracy-driven configuration would normally shorten
them. All formats are limited to 32 bits.

Measured accuracy of `yhat` against a double-precision LMS, for a
128-tap filter identifying an 8-tap system from half-scale white input
(`tb_lms_accuracy`):

| formats (x / h / products / sums) | yhat SQNR |
|---|---|
| 12 / 12 / 24 / 20 bits | about 13 dB |
| 16 / 16 / 32 / 32 bits (defaults) | 43 – 45 dB |
| 24 / 28 / 32 / 32 bits, sums with 28 fractional bits | 108 – 110 dB |

Two effects set the ceiling. The first is the weight-update rounding,
governed by `FH`. The second is the truncation of every product when it
enters the sum format. That truncation adds a bias of up to N/2 LSBs of
`FO` to each output, so for high accuracy give the sums as many
fractional bits as their range allows.

## The IIR IP

`iir_cell` computes one section
`H(z) = (b0 + … + bR z^-R) / (1 + a1 z^-1 + … + aR z^-R)` in one of three
structures:

* **`IIR_DF1`**: stores R past inputs and R past outputs. One
  accumulation gives y.
* **`IIR_DF2`**: stores R past values of `w(n) = x(n) − Σ a_k w(n−k)`,
  with `y = Σ b_k w(n−k)`.
* **`IIR_TDF2`**: stores R adder outputs `s_k`, with `y = b0·x + s_1` and
  `s_k ← b_k·x − a_k·y + s_{k+1}`.

Products are exact. Sums are formed in a `BA`-bit accumulator. Values are
truncated to the cell's signal format (`BS` bits, `FS` fractional bits)
wherever they are stored or leave the cell. For the transposed form, that includes every stored adder
output. This extra quantization is why TDF2 is the noisiest of the three
structures: in the cascade test it measures about 5 dB below direct form I.

`iir_cascade` chains `N_IIR / CELL_ORDER` cells of one structure.

* Factorisation is chosen by the coefficients the caller supplies.
* Permutation is chosen by the order in which they are assigned: cell 0
  sees the input first.
* A sample passes through all cells combinationally.
* The state advances when `x_valid` is high, and `y_out` / `y_valid`
  appear one cycle later.
* Coefficients are input ports and must be held stable.
* Each cell has its own signal binary point, `FS_CELL[c]`, all in
  `BS`-bit words. Input and output use `FS`. Between two cells whose
  formats differ, the value is shifted to the next binary point, with the
  usual truncate-and-wrap rule. This lets the integer part follow the
  dynamic range along the cascade: a high-gain section needs more integer
  bits after it. By default every cell uses `FS`.

Which structure and which order of sections is most accurate depends on
the filter. For the test filter in `tb_iir_permutations` (four resonant
sections, all 24 orders), the output SQNR at the default formats is:

| structure | SQNR range over the 24 orders |
|---|---|
| direct form I | 31 – 45 dB |
| direct form II | −9 – 43 dB |
| transposed form II | 22 – 38 dB |

The direct-form-II orders at the bottom of that range wrap their internal
state `w`. Its gain is the inverse of the denominator alone, and the
shared Q2.13 format has too few integer bits for it. With two more
integer bits in every cell (`FS_CELL` = 11), direct form II spans
29 – 31 dB: no order wraps any more, but every order pays for the lost
fractional bits. A word-length optimiser would pick the format per cell
and per order. Transposed form II stays 7–9 dB below direct form I
across the orders.

The same filter can also be built from larger cells (`tb_iir_structures`).
Two fourth-order cells with 15-bit coefficients give 6 arrangements:
3 pairings of the sections, times 2 orders. One eighth-order cell needs
24-bit coefficients and a 48-bit accumulator.

| structure | two 4th-order cells, 6 arrangements | one 8th-order cell |
|---|---|---|
| direct form I | 27 – 45 dB | 42 dB |
| direct form II | −12 – 43 dB | 43 dB |
| transposed form II | 14 – 35 dB | 24 dB |

Together with the 24 second-order orders, this covers all 31
arrangements of each structure, 93 filters in all.

The defaults describe an 8th-order filter made of four second-order cells
in transposed form II:

* 13-bit coefficients with 11 fractional bits. Second-order denominators
  need |a1| < 2.
* 16-bit signals with 13 fractional bits.
* A 32-bit accumulator.

Larger cells need longer coefficients: about 15 bits for fourth order and
24 bits for a single eighth-order cell. Set `BA ≥ BS + BC` when you
lengthen them. BA may go up to 62 bits. The testbenches run a fourth-order
cascade and a single eighth-order cell with 24-bit coefficients and
`BA = 48`.

The IIR datapath has one set of operators per cell, with no time
multiplexing. How operators are shared under a throughput constraint is
left open.

## Departures and open points

* **DLMS update.** The regressor is delayed with the error, as explained
  above. Pairing x_n with e(n−D) was also considered. It fails to converge
  in bit-accurate simulation, so it is not used.
* **Weight-update rounding.** See the fixed-point conventions above.
  Every other cast truncates.
* **Storage count.** Direct form I stores 2R values per cell, and the
  other two forms store R. For the 8th-order filter that is 16 and 8
  words, whatever the cell order. A published complexity summary for
  this filter lists 15 and 12. How it counts is not stated. Adder and
  multiplier counts agree: 16 additions, and 17, 18 or 20
  multiplications for one, two or four cells.
* **Choices with no value given.** The step size, the binary points, the
  `L_ADD` value, the DLMS delay, the handshake and reset are all design
  choices. Each is a parameter or a short piece of logic.
* **Memories.** Both memories are register arrays with several
  combinational read ports. A real implementation would map them to K
  banks. In the data memory, tap-to-lane assignment then rotates with the
  write pointer.
* **Not included.** The word-length optimiser, the dynamic-range and
  noise-power analysis, and the characterised operator library are
  design-time tools, not hardware. Their results enter only as parameter
  values.
* **No verified timing.** Nothing has been run through a real cell
  library. Cycle counts are exact, but clock periods are not.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_lms_dlms_ip` | Four configurations: LMS with N=10, K=4; DLMS with D=2, N=8, K=2; LMS with N=16, K=8, L_ADD=2; DLMS with D=1, N=128, K=20. Each is checked bit for bit against a reference model (`lms_ip_harness`): every yhat, every err and every final weight. Also checked: exact latency, exact sample period, and that the error falls by 4× (system identification of a 4-tap FIR). |
| `tb_lms_data_mem`, `tb_lms_coef_mem` | Read ports against array models: tap offset, dead lanes, read-before-write. |
| `tb_lms_filter_mult`, `tb_lms_adder_tree`, `tb_lms_accumulator`, `tb_lms_error`, `tb_lms_adapt_mad` | Arithmetic and truncation/wrap rules, pipeline depth (`M_ADD` for K = 1, 5, 8), tags, delay line. |
| `tb_lms_ctrl` | Issue order, first/last marks, LMS and DLMS periods. |
| `tb_iir_cell` | All three forms at order 2, a third-order TDF2 cell and an eighth-order DF2 cell, checked bit for bit against `iir_ref_pkg`. |
| `tb_iir_cascade` | 8th-order cascades in all three forms, a 4th-order-cell cascade, and a TDF2 cascade with per-cell formats 14/13/12/13. Bit-exact. SQNR against double precision is above 30 dB, and TDF2 is below DF1. A DF1 cascade with 26-bit signals and `BA = 48` must reach 90 dB (measured 101; 24-bit signals give 89). |
| `tb_iir_permutations` | All 24 orders of four second-order sections in all three forms. Every output is checked bit-exact, and the SQNR range of each form is reported. The SQNR must vary with the order. A DF2 cascade with `FS_CELL` = 11 must raise the worst order by 10 dB or more. |
| `tb_iir_structures` | The same filter as two fourth-order cells (6 arrangements) and as one eighth-order cell, in all three forms. Coefficients are products of the section polynomials, rounded to 15 or 24 bits. Bit-exact, with the SQNR reported; the fourth-order SQNR must vary with the arrangement. |
| `tb_lms_accuracy` | A 128-tap LMS at the default formats and at 12/12/24/20-bit formats runs against a double-precision LMS. yhat SQNR must be above 40 dB at the defaults (measured 43–45), and at least 10 dB above the shortened formats (measured about 13 dB). A third instance with 24-bit samples, 28-bit coefficients and 28 fractional bits in the sums must reach 90 dB (measured 108–110). |
| `tb_fxp_ip_top` | The whole design at default parameters. The 128-tap LMS with K = 4 runs 2000 samples, with every output and final weight checked and the error falling by 2× or more. The default IIR cascade is checked at the same time. The test counts stalls, back-to-back samples, weight updates and idle cycles, and fails if any of them never occurred. |
| `tb_fxp_ip_top_modes` | The same checks for a DLMS (D = 2, K = 5 with N = 24, L_ADD = 2) with a DF1 cascade, and for an LMS (K = 8) with a DF2 cascade. |

Example run with Verilator 5 (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fxp_pkg.sv tb/iir_ref_pkg.sv tb/tb_fxp_ip_top.sv \
    --top-module tb_fxp_ip_top -o sim
./obj_dir/sim
```

The full-size run takes a few seconds. Any other testbench builds the
same way with its own `--top-module`. The package files must come first
on the command line.
