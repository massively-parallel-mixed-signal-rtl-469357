// kerneltron_top -- the Kerneltron processors side by side.
//
// 1. Kerneltron II recognition path (the main configuration): the
//    oversampling array processor kt2_core computes 8-bit inner products of
//    the input with every array row; bitplane_combiner merges the KT2_WBITS
//    rows of each template into one template inner product; kernel_svm maps
//    each through the kernel look-up table, weights it by its coefficient and
//    thresholds the sum into a classification decision.  The decision pass
//    starts automatically when a conversion completes.
// 2. Kerneltron I multi-chip system (kt1_multichip): P processor chips and a
//    reference chip with flash ADCs, offset compensation and shift-and-
//    accumulate reconstruction.
// 3. Stochastic-encoding multiplier (kt_stoch).
// The three share only clock and reset; each has its own ports, prefixed
// k2_, k1_ and ks_.  All parameters take their defaults from kt_pkg and the
// sub-modules.
// The classifier's busy output is left open: its done pulse (k2_svm_done) is
// the only status the top reports for it.
module kerneltron_top
  import kt_pkg::*;
#(
  parameter int unsigned K2_N_IN  = KT2_N_IN,
  parameter int unsigned K2_ROWS  = KT2_ROWS,
  parameter int unsigned K2_REFRESH_PERIOD = 800,
  parameter int unsigned K2_RETENTION      = 213_000,
  parameter int unsigned K1_P     = 2,
  parameter int unsigned K1_N_IN  = KT1_N_IN,
  parameter int unsigned K1_ROWS  = KT1_ROWS,
  parameter int unsigned KS_N_IN  = 1024,
  parameter int unsigned KS_ROWS  = 128,
  localparam int unsigned K2_RW   = $clog2(K2_ROWS),
  localparam int unsigned K2_M    = K2_ROWS / KT2_WBITS,
  localparam int unsigned K2_MW   = (K2_M > 1) ? $clog2(K2_M) : 1,
  localparam int unsigned K2_CW   = 12,
  localparam int unsigned K2_QW   = K2_CW + KT2_WBITS,
  localparam int unsigned K1_RW   = $clog2(K1_ROWS),
  localparam int unsigned K1_M    = K1_ROWS / KT1_WBITS,
  localparam int unsigned K1_CSW  = $clog2(K1_P + 1),
  localparam int unsigned K1_QW   = KT1_ADC_BITS + 1 + KT1_WBITS + 1 + KT1_XBITS,
  localparam int unsigned KS_RW   = $clog2(KS_ROWS),
  localparam int unsigned KS_M    = KS_ROWS / 8,
  localparam int unsigned KS_QW   = (8 + 8 + 2) + (8 + 4 + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // ---- Kerneltron II ----
  input  logic                      k2_w_sdi,
  input  logic                      k2_w_shift,
  input  logic                      k2_w_write,
  input  logic                      k2_w_read,
  input  logic [K2_RW-1:0]          k2_w_row,
  output logic                      k2_w_sdo,
  input  logic                      k2_x_shift,
  input  logic signed [KT2_XBITS-1:0] k2_x_din,
  output logic                      k2_x_dropped,
  input  logic                      k2_start,
  output logic                      k2_busy,
  output logic                      k2_done,
  output logic signed [K2_CW-1:0]   k2_sout,
  output logic                      k2_sout_valid,
  output logic [K2_RW-1:0]          k2_sout_idx,
  output logic                      k2_ref_deferred,
  output logic signed [K2_QW-1:0]   k2_q [K2_M],
  input  logic                      k2_lut_we,
  input  logic [7:0]                k2_lut_addr,
  input  logic signed [7:0]         k2_lut_data,
  input  logic                      k2_coef_we,
  input  logic [K2_MW-1:0]          k2_coef_addr,
  input  logic signed [7:0]         k2_coef_data,
  input  logic signed [23:0]        k2_bias,
  output logic                      k2_svm_done,
  output logic signed [23:0]        k2_svm_score,
  output logic                      k2_svm_decision,
  // ---- Kerneltron I multi-chip ----
  input  logic [K1_CSW-1:0]         k1_chip_sel,
  input  logic                      k1_w_sdi_even,
  input  logic                      k1_w_sdi_odd,
  input  logic                      k1_w_shift,
  input  logic                      k1_w_write,
  input  logic                      k1_w_read,
  input  logic [K1_RW-1:0]          k1_w_row,
  output logic                      k1_w_sdo_even,
  output logic                      k1_w_sdo_odd,
  input  logic                      k1_x_shift,
  input  logic [KT1_XBITS-1:0]      k1_x_din,
  input  logic                      k1_start,
  output logic                      k1_busy,
  output logic                      k1_done,
  output logic signed [K1_QW-1:0]   k1_result [K1_P*K1_M],
  output logic                      k1_ref_deferred,
  // ---- stochastic encoding ----
  input  logic                      ks_w_sdi,
  input  logic                      ks_w_shift,
  input  logic                      ks_w_write,
  input  logic [KS_RW-1:0]          ks_w_row,
  input  logic                      ks_x_shift,
  input  logic [7:0]                ks_x_din,
  input  logic                      ks_start,
  input  logic                      ks_calibrate,
  output logic                      ks_busy,
  output logic                      ks_done,
  output logic                      ks_calibrated,
  output logic signed [KS_QW-1:0]   ks_result [KS_M],
  output logic [15:0]               ks_ovf_count
);

  // ------------------------------------------------------------ Kerneltron II
  logic signed [K2_CW-1:0] k2_rowq [K2_ROWS];

  kt2_core #(.N_IN(K2_N_IN), .ROWS(K2_ROWS), .CW(K2_CW),
             .REFRESH_PERIOD(K2_REFRESH_PERIOD), .RETENTION(K2_RETENTION)) u_kt2 (
    .clk, .rst_n,
    .w_sdi(k2_w_sdi), .w_shift(k2_w_shift), .w_write(k2_w_write), .w_read(k2_w_read),
    .w_row(k2_w_row), .w_sdo(k2_w_sdo),
    .x_shift(k2_x_shift), .x_din(k2_x_din), .x_dropped(k2_x_dropped),
    .start(k2_start), .busy(k2_busy), .done(k2_done), .q(k2_rowq),
    .sout(k2_sout), .sout_valid(k2_sout_valid), .sout_idx(k2_sout_idx),
    .ref_deferred(k2_ref_deferred));

  bitplane_combiner #(.M(K2_M), .IB(KT2_WBITS), .DW(K2_CW), .QW(K2_QW)) u_comb (
    .d(k2_rowq), .q(k2_q));

  kernel_svm #(.M(K2_M), .QW(K2_QW), .KA(8), .KW(8), .CW(8), .QSHIFT(5), .AW(24)) u_svm (
    .clk, .rst_n,
    .lut_we(k2_lut_we), .lut_addr(k2_lut_addr), .lut_data(k2_lut_data),
    .coef_we(k2_coef_we), .coef_addr(k2_coef_addr), .coef_data(k2_coef_data),
    .bias(k2_bias), .start(k2_done), .q(k2_q), .busy(),
    .done(k2_svm_done), .score(k2_svm_score), .decision(k2_svm_decision));

  // ------------------------------------------------------------- Kerneltron I
  kt1_multichip #(.P(K1_P), .N_IN(K1_N_IN), .ROWS(K1_ROWS)) u_kt1 (
    .clk, .rst_n, .chip_sel(k1_chip_sel),
    .w_sdi_even(k1_w_sdi_even), .w_sdi_odd(k1_w_sdi_odd), .w_shift(k1_w_shift),
    .w_write(k1_w_write), .w_read(k1_w_read), .w_row(k1_w_row),
    .w_sdo_even(k1_w_sdo_even), .w_sdo_odd(k1_w_sdo_odd),
    .x_shift(k1_x_shift), .x_din(k1_x_din), .start(k1_start), .busy(k1_busy),
    .done(k1_done), .result(k1_result), .ref_deferred(k1_ref_deferred));

  // ------------------------------------------------------ stochastic encoding
  kt_stoch #(.N_IN(KS_N_IN), .ROWS(KS_ROWS), .IB(8), .XBITS(8), .EBITS(4), .L(8)) u_ks (
    .clk, .rst_n, .w_sdi(ks_w_sdi), .w_shift(ks_w_shift), .w_write(ks_w_write),
    .w_row(ks_w_row), .x_shift(ks_x_shift), .x_din(ks_x_din), .start(ks_start),
    .calibrate(ks_calibrate), .busy(ks_busy), .done(ks_done),
    .calibrated(ks_calibrated), .result(ks_result), .ovf_count(ks_ovf_count));

endmodule
