// fxp_ip_top - the two fixed-point IP blocks side by side.
//
// The design holds two independent accuracy-configurable IPs, each with
// its own ports:
//   * an LMS / delayed-LMS adaptive FIR filter (lms_dlms_ip), N taps,
//     parallelism K, error delay LMS_DELAY (0: LMS);
//   * a cascaded IIR filter (iir_cascade) of order N_IIR made of cells of
//     order CELL_ORDER in structure IIR_FORM.
// They share only clock and reset. Port and timing details are those of
// the two blocks (see their headers). All parameters default to the
// blocks' defaults: 128-tap LMS with K = 4, and an 8th-order IIR of four
// transposed-form-II second-order cells.
module fxp_ip_top
  import fxp_pkg::*;
#(
  // LMS / DLMS
  parameter int unsigned N         = 128,
  parameter int unsigned K         = 4,
  parameter int unsigned BX        = 16, parameter int FX = 15,
  parameter int unsigned BH        = 16, parameter int FH = 15,
  parameter int unsigned BM        = 32, parameter int FM = 30,
  parameter int unsigned BO        = 32, parameter int FO = 24,
  parameter int unsigned L_ADD     = 1,
  parameter int unsigned MU_SHIFT  = 6,
  parameter int unsigned LMS_DELAY = 0,
  // IIR
  parameter int unsigned N_IIR      = 8,
  parameter int unsigned CELL_ORDER = 2,
  parameter iir_form_e   IIR_FORM   = IIR_TDF2,
  parameter int unsigned BS         = 16, parameter int FS = 13,
  parameter int unsigned BC         = 13, parameter int FC = 11,
  parameter int unsigned BA         = 32,
  parameter int          FS_CELL [N_IIR / CELL_ORDER] = '{default: FS},
  localparam int unsigned AW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NCELL = N_IIR / CELL_ORDER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // LMS / DLMS IP
  input  logic                 lms_x_valid,
  output logic                 lms_x_ready,
  input  logic signed [BX-1:0] lms_x,
  input  logic signed [BO-1:0] lms_y,
  output logic                 lms_yhat_valid,
  output logic signed [BO-1:0] lms_yhat,
  output logic                 lms_err_valid,
  output logic signed [BO-1:0] lms_err,
  input  logic [AW-1:0]        lms_coef_addr,
  output logic signed [BH-1:0] lms_coef_data,
  // IIR IP
  input  logic                 iir_x_valid,
  input  logic signed [BS-1:0] iir_x,
  input  logic signed [BC-1:0] iir_b [NCELL][CELL_ORDER+1],
  input  logic signed [BC-1:0] iir_a [NCELL][CELL_ORDER],
  output logic                 iir_y_valid,
  output logic signed [BS-1:0] iir_y
);
  lms_dlms_ip #(
    .N(N), .K(K), .BX(BX), .FX(FX), .BH(BH), .FH(FH), .BM(BM), .FM(FM),
    .BO(BO), .FO(FO), .L_ADD(L_ADD), .MU_SHIFT(MU_SHIFT), .DELAY(LMS_DELAY)
  ) u_lms (
    .clk, .rst_n,
    .x_valid(lms_x_valid), .x_ready(lms_x_ready), .x_in(lms_x), .y_in(lms_y),
    .yhat_valid(lms_yhat_valid), .yhat(lms_yhat),
    .err_valid(lms_err_valid), .err(lms_err),
    .coef_addr(lms_coef_addr), .coef_data(lms_coef_data)
  );

  iir_cascade #(
    .N_IIR(N_IIR), .CELL_ORDER(CELL_ORDER), .FORM(IIR_FORM),
    .BS(BS), .FS(FS), .BC(BC), .FC(FC), .BA(BA), .FS_CELL(FS_CELL)
  ) u_iir (
    .clk, .rst_n, .x_valid(iir_x_valid), .x_in(iir_x),
    .b_coef(iir_b), .a_coef(iir_a), .y_valid(iir_y_valid), .y_out(iir_y)
  );
endmodule
