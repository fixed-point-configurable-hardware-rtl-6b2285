// iir_cascade - fixed-point IIR filter IP built as a cascade of cells.
//
// An N_IIR-order filter is split into N_IIR / CELL_ORDER cells of order
// CELL_ORDER (the factorised numerator and denominator), all of the same
// structure FORM (direct form I, direct form II or transposed form II).
// The order in which the cell transfer functions are placed (the
// permutation) is set simply by which coefficients are given to which
// cell: cell 0 sees the input first. One sample passes through all cells
// within a cycle; the output is registered.
//
// Binary points: x_in and y_out are in the BS/FS format. The signals of
// cell c (its input, its stored values and its output) have FS_CELL[c]
// fractional bits, so each cell's integer part can follow the dynamic
// range at that point of the cascade. Where two neighbouring formats
// differ, a scaling step is placed between them: the value is shifted to
// the next binary point, truncating dropped bits and wrapping to BS bits,
// the same rule as every other cast in the design. With the default
// (every FS_CELL[c] = FS) the scaling steps vanish.
//
// Interface: x_in is taken when x_valid is high; y_out / y_valid follow
// one cycle later. Coefficients are inputs (b_coef[c][0..R],
// a_coef[c][1..R] stored at index 0..R-1) and must stay stable while
// samples are filtered.
// Defaults: an 8th-order filter of four second-order cells with 13-bit
// coefficients in transposed form II, the configuration with the lowest
// energy in the document's exploration. A binary point per datum with
// scaling between formats follows the document; the signal formats
// themselves and the single-cycle datapath are this design's choices.
module iir_cascade
  import fxp_pkg::*;
#(
  parameter int unsigned N_IIR      = 8,
  parameter int unsigned CELL_ORDER = 2,
  parameter iir_form_e   FORM       = IIR_TDF2,
  parameter int unsigned BS         = 16, parameter int FS = 13,
  parameter int unsigned BC         = 13, parameter int FC = 11,
  parameter int unsigned BA         = 32,
  parameter int          FS_CELL [N_IIR / CELL_ORDER] = '{default: FS},
  localparam int unsigned NCELL = N_IIR / CELL_ORDER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [BS-1:0] x_in,
  input  logic signed [BC-1:0] b_coef [NCELL][CELL_ORDER+1],
  input  logic signed [BC-1:0] a_coef [NCELL][CELL_ORDER],
  output logic                 y_valid,
  output logic signed [BS-1:0] y_out
);
  initial assert (N_IIR % CELL_ORDER == 0)
    else $error("iir_cascade: CELL_ORDER must divide N_IIR");

  // s[c]: input of cell c in the FS_CELL[c] format; o[c]: its output in
  // the same format
  logic signed [BS-1:0] s [NCELL];
  logic signed [BS-1:0] o [NCELL];
  logic signed [BS-1:0] y_d;

  assign s[0] = BS'(to_fmt(wide_t'(x_in), FS, FS_CELL[0], BS));

  for (genvar c = 0; c < NCELL; c++) begin : g_cell
    iir_cell #(.ORDER(CELL_ORDER), .FORM(FORM), .BS(BS), .FS(FS_CELL[c]),
               .BC(BC), .FC(FC), .BA(BA)) u_cell (
      .clk, .rst_n, .en(x_valid), .x(s[c]), .b(b_coef[c]), .a(a_coef[c]), .y(o[c])
    );
    if (c + 1 < NCELL) begin : g_scale
      assign s[c+1] = BS'(to_fmt(wide_t'(o[c]), FS_CELL[c], FS_CELL[c+1], BS));
    end
  end

  assign y_d = BS'(to_fmt(wide_t'(o[NCELL-1]), FS_CELL[NCELL-1], FS, BS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_out   <= '0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) y_out <= y_d;
    end
  end
endmodule
