// Fault-tolerant parallel FFTs: the two protection schemes side by side.
//
// Each half is a pfft_system: four parallel 1024-point FFTs (12-bit inputs,
// 14-bit outputs) plus one parity FFT, checked by Parseval sum-of-squares
// checks and corrected from the parity FFT.
//   ecc_*  parity-SOS-ECC (second technique): three checks on the Hamming
//          groups {1,2,3}, {1,2,4}, {1,3,4}; the check pattern locates the FFT
//          in error. This is the cheaper of the two.
//   sos_*  parity-SOS (first technique): one check per FFT.
// The two halves share only clock and reset; each has its own ports, with the
// meaning and timing given in pfft_system. The fi_* ports inject soft errors
// for test and are tied low in normal use.
//
// Both schemes and all sizes follow the document; placing them side by side in
// one top is this design's own arrangement.
module ft_parallel_fft
  import fft_pkg::*;
#(
  parameter int K         = 4,
  parameter int LOG4N     = 5,
  parameter int IN_W      = 12,
  parameter int OUT_W     = 14,
  parameter int ACC_W     = 39,
  parameter int TAU       = 1,
  parameter int TAU_SHIFT = 21,
  parameter int RE        = num_checks(K, SCHEME_PARITY_SOS_ECC),
  parameter int RS        = num_checks(K, SCHEME_PARITY_SOS),
  parameter int POUT_W    = OUT_W + clog2i(K),
  parameter int LW        = $clog2(K + 1),
  parameter int SW        = $clog2(LOG4N + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ---- parity-SOS-ECC array
  input  logic [SW-1:0]            ecc_cfg_stages,
  input  logic                     ecc_in_valid,
  output logic                     ecc_in_ready,
  input  logic signed [IN_W-1:0]   ecc_x_re [K],
  input  logic signed [IN_W-1:0]   ecc_x_im [K],
  output logic                     ecc_status_valid,
  output logic [RE-1:0]            ecc_syndrome,
  output logic [LW-1:0]            ecc_err_loc,
  output logic                     ecc_check_error,
  output logic                     ecc_uncorrectable,
  output logic                     ecc_tmr_mismatch,
  output logic                     ecc_out_valid,
  output logic                     ecc_out_last,
  output logic [2*LOG4N-1:0]       ecc_out_idx,
  output logic signed [OUT_W-1:0]  ecc_y_re [K],
  output logic signed [OUT_W-1:0]  ecc_y_im [K],
  input  logic [K:0]               ecc_fi_fft,
  input  logic                     ecc_fi_coef,
  input  logic [SW-1:0]            ecc_fi_stage,
  input  logic [2*LOG4N-1:0]       ecc_fi_addr,
  input  logic [POUT_W-1:0]        ecc_fi_mask_re,
  input  logic [POUT_W-1:0]        ecc_fi_mask_im,
  input  logic [RE-1:0]            ecc_fi_check,
  // ---- parity-SOS array
  input  logic [SW-1:0]            sos_cfg_stages,
  input  logic                     sos_in_valid,
  output logic                     sos_in_ready,
  input  logic signed [IN_W-1:0]   sos_x_re [K],
  input  logic signed [IN_W-1:0]   sos_x_im [K],
  output logic                     sos_status_valid,
  output logic [RS-1:0]            sos_syndrome,
  output logic [LW-1:0]            sos_err_loc,
  output logic                     sos_check_error,
  output logic                     sos_uncorrectable,
  output logic                     sos_tmr_mismatch,
  output logic                     sos_out_valid,
  output logic                     sos_out_last,
  output logic [2*LOG4N-1:0]       sos_out_idx,
  output logic signed [OUT_W-1:0]  sos_y_re [K],
  output logic signed [OUT_W-1:0]  sos_y_im [K],
  input  logic [K:0]               sos_fi_fft,
  input  logic                     sos_fi_coef,
  input  logic [SW-1:0]            sos_fi_stage,
  input  logic [2*LOG4N-1:0]       sos_fi_addr,
  input  logic [POUT_W-1:0]        sos_fi_mask_re,
  input  logic [POUT_W-1:0]        sos_fi_mask_im,
  input  logic [RS-1:0]            sos_fi_check
);

  pfft_system #(
    .K(K), .SCHEME(SCHEME_PARITY_SOS_ECC), .LOG4N(LOG4N), .IN_W(IN_W), .OUT_W(OUT_W),
    .ACC_W(ACC_W), .TAU(TAU), .TAU_SHIFT(TAU_SHIFT)
  ) u_parity_sos_ecc (
    .clk, .rst_n,
    .cfg_stages(ecc_cfg_stages), .in_valid(ecc_in_valid), .in_ready(ecc_in_ready),
    .x_re(ecc_x_re), .x_im(ecc_x_im),
    .status_valid(ecc_status_valid), .syndrome(ecc_syndrome), .err_loc(ecc_err_loc),
    .check_error(ecc_check_error), .uncorrectable(ecc_uncorrectable),
    .tmr_mismatch(ecc_tmr_mismatch),
    .out_valid(ecc_out_valid), .out_last(ecc_out_last), .out_idx(ecc_out_idx),
    .y_re(ecc_y_re), .y_im(ecc_y_im),
    .fi_fft(ecc_fi_fft), .fi_coef(ecc_fi_coef), .fi_stage(ecc_fi_stage), .fi_addr(ecc_fi_addr),
    .fi_mask_re(ecc_fi_mask_re), .fi_mask_im(ecc_fi_mask_im), .fi_check(ecc_fi_check));

  pfft_system #(
    .K(K), .SCHEME(SCHEME_PARITY_SOS), .LOG4N(LOG4N), .IN_W(IN_W), .OUT_W(OUT_W),
    .ACC_W(ACC_W), .TAU(TAU), .TAU_SHIFT(TAU_SHIFT)
  ) u_parity_sos (
    .clk, .rst_n,
    .cfg_stages(sos_cfg_stages), .in_valid(sos_in_valid), .in_ready(sos_in_ready),
    .x_re(sos_x_re), .x_im(sos_x_im),
    .status_valid(sos_status_valid), .syndrome(sos_syndrome), .err_loc(sos_err_loc),
    .check_error(sos_check_error), .uncorrectable(sos_uncorrectable),
    .tmr_mismatch(sos_tmr_mismatch),
    .out_valid(sos_out_valid), .out_last(sos_out_last), .out_idx(sos_out_idx),
    .y_re(sos_y_re), .y_im(sos_y_im),
    .fi_fft(sos_fi_fft), .fi_coef(sos_fi_coef), .fi_stage(sos_fi_stage), .fi_addr(sos_fi_addr),
    .fi_mask_re(sos_fi_mask_re), .fi_mask_im(sos_fi_mask_im), .fi_check(sos_fi_check));

endmodule
