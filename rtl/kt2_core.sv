// kt2_core -- Kerneltron II oversampling matrix-vector multiplier (one chip).
//
// Computes, for every array row r, the inner product between the stored row
// of N_IN signed template bits and the vector of N_IN signed XBITS-bit inputs,
// as an 8-bit (for the defaults) digital word:
//   q[r] ~= (2**(ELL*STEPS) / (N_IN*2**XBITS)) * sum_n w[r][n] * 2*X[n]
// with w = +1/-1.  Inputs are presented as 2**ELL unary bit planes (one per
// cycle); the array forms, on each row's sense line, the signed sum of the
// bitwise products; each row's delta-sigma algorithmic ADC integrates those
// sums over the planes (first incremental step) and then re-converts its own
// residue (further steps), its shifting counter decimating the bit stream.
// For the defaults one conversion takes 2 x (16 + 1) = 34 cycles.
//
// Interface (all synchronous to clk, asynchronous active-low reset):
//   template port   w_sdi/w_shift fill the template register serially;
//                   w_write stores it into row w_row; w_read copies row
//                   w_row back into the register, read out on w_sdo.
//   input port      x_shift/x_din shift one input word in per cycle
//                   (ignored while busy, flagged on x_dropped).
//   conversion      start (when idle) -> busy for 34 cycles -> done for one
//                   cycle; q[] then holds the results until the next start.
//   output port     after done, the results also leave word-serially on
//                   sout (row 0 first) with sout_valid / sout_idx.
//   refresh         an internal controller refreshes one half row every
//                   REFRESH_PERIOD cycles, deferring while the template port
//                   writes or reads (ref_deferred).
// The array and the modulators are behavioural models of analog circuits;
// everything else is synthesizable.
// The refresh timer strobe (ref_tick) is left unused inside the chip on purpose:
// it is kept as a named net so that testbenches can observe the refresh clock.
module kt2_core
  import kt_pkg::*;
#(
  parameter int unsigned N_IN           = KT2_N_IN,
  parameter int unsigned ROWS           = KT2_ROWS,
  parameter int unsigned XBITS          = KT2_XBITS,
  parameter int unsigned ELL            = KT2_ELL,
  parameter int unsigned STEPS          = KT2_STEPS,
  parameter int unsigned CW             = 12,
  parameter int unsigned REFRESH_PERIOD = 800,
  parameter int unsigned RETENTION      = 213_000,
  parameter real         ALPHA          = 0.5,
  localparam int unsigned RW            = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned YW            = $clog2(N_IN * CELL_UNITS) + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // template port
  input  logic                    w_sdi,
  input  logic                    w_shift,
  input  logic                    w_write,
  input  logic                    w_read,
  input  logic [RW-1:0]           w_row,
  output logic                    w_sdo,
  // input port
  input  logic                    x_shift,
  input  logic signed [XBITS-1:0] x_din,
  output logic                    x_dropped,
  // conversion
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic signed [CW-1:0]    q [ROWS],
  // serial output
  output logic signed [CW-1:0]    sout,
  output logic                    sout_valid,
  output logic [RW-1:0]           sout_idx,
  // refresh status
  output logic                    ref_deferred
);

  initial begin
    assert (XBITS == ELL)
      else $error("unary coding of an XBITS-bit input needs 2**XBITS cycles per step");
  end

  logic [N_IN-1:0]         treg, rd_data, x_bits;
  logic signed [XBITS-1:0] words [N_IN];
  logic signed [YW-1:0]    y [ROWS];
  logic [ELL-1:0]          unary_idx;
  logic                    mod_clear, mod_step, mod_last, mod_use_res, mod_zero_in;
  logic                    cnt_clear, cnt_en, cnt_shift;
  logic                    ref_en, ref_odd;
  logic                    ref_tick;  // timer strobe, monitored by testbenches only
  logic [RW-1:0]           ref_row;
  logic                    y_bits [ROWS];

  template_shift_reg #(.WIDTH(N_IN)) u_treg (
    .clk, .rst_n, .shift_en(w_shift), .sdi(w_sdi), .load_en(w_read),
    .load_data(rd_data), .q(treg), .sdo(w_sdo));

  input_shift_reg #(.N_IN(N_IN), .XBITS(XBITS)) u_xreg (
    .clk, .rst_n, .shift_en(x_shift), .hold(busy), .din(x_din),
    .words, .dropped(x_dropped));

  unary_encoder #(.N_IN(N_IN), .XBITS(XBITS)) u_unary (
    .x_words(words), .idx(unary_idx[XBITS-1:0]), .x_bits);

  dram_refresh_ctrl #(.ROWS(ROWS), .PERIOD(REFRESH_PERIOD), .EXT_TICK(1'b0)) u_refresh (
    .clk, .rst_n, .tick_in(1'b0), .busy(w_write || w_read), .tick_out(ref_tick),
    .ref_en, .ref_row, .ref_odd, .deferred(ref_deferred));

  cid_dram_array #(.N_IN(N_IN), .ROWS(ROWS), .SIGNED(1'b1), .CELL_UNITS(CELL_UNITS),
                   .FEEDTHRU(0), .RETENTION(RETENTION), .YW(YW)) u_array (
    .clk, .rst_n, .wr_en(w_write), .wr_row(w_row), .wr_data(treg),
    .rd_row(w_row), .rd_data, .ref_en, .ref_row, .ref_odd, .x(x_bits), .y);

  kt2_sequencer #(.ELL(ELL), .STEPS(STEPS)) u_seq (
    .clk, .rst_n, .start, .busy, .done, .mod_clear, .mod_step, .mod_last,
    .mod_use_res, .mod_zero_in, .cnt_clear, .cnt_en, .cnt_shift, .unary_idx);

  for (genvar r = 0; r < ROWS; r++) begin : g_adc
    ds_modulator #(.YW(YW), .FULL_SCALE(N_IN * CELL_UNITS), .ALPHA(ALPHA)) u_mod (
      .clk, .rst_n, .clear(mod_clear), .step(mod_step), .last(mod_last),
      .use_res(mod_use_res), .zero_in(mod_zero_in), .y_in(y[r]), .y_bit(y_bits[r]));
    decim_shift_counter #(.ELL(ELL), .CW(CW)) u_cnt (
      .clk, .rst_n, .clear(cnt_clear), .en(cnt_en), .shift(cnt_shift),
      .y_bit(y_bits[r]), .count(q[r]));
  end

  output_serializer #(.NCH(ROWS), .W(CW)) u_out (
    .clk, .rst_n, .capture(done), .din(q), .sout, .sout_valid, .sout_idx);

endmodule
