// kt1_chip -- Kerneltron I matrix-vector multiplier chip (one die).
//
// A ROWS x N_IN array of unsigned charge-injection cells with embedded DRAM
// computes, for the input bit plane selected by `plane`, the binary-binary
// partial inner products of every row with the plane's bits; a bank of ROWS
// gray-code flash ADCs quantizes them in the same cycle (gray[]).  Combining
// the partials over rows and planes is left to the system (kt1_multichip),
// as in the original chip.
//
// Templates are loaded through two serial shift registers, one for the even
// and one for the odd columns (w_sdi_even / w_sdi_odd, shifted together by
// w_shift), then written into row w_row by w_write; w_read copies a stored
// row back for serial test read-out on w_sdo_even / w_sdo_odd.  Input words
// (unsigned, XBITS bits) are shifted in through x_shift / x_din.  The refresh
// controller takes its requests from ref_tick_in when EXT_TICK is set, so
// that all chips of a system refresh in step; otherwise from its own timer.
// The array and the flash ADCs are behavioural models of analog circuits.
// The input register's drop flag and the refresh controller's own timer strobe
// are left open: inputs are held by the system controller (x_hold), and refresh
// follows the shared strobe ref_tick_in.
module kt1_chip
  import kt_pkg::*;
#(
  parameter int unsigned N_IN           = KT1_N_IN,
  parameter int unsigned ROWS           = KT1_ROWS,
  parameter int unsigned XBITS          = KT1_XBITS,
  parameter int unsigned L              = KT1_ADC_BITS,
  parameter int unsigned FEEDTHRU       = 4,
  parameter int unsigned ADC_STEP       = (N_IN * (CELL_UNITS + FEEDTHRU) + (2**L) - 2) / ((2**L) - 1),
  parameter int unsigned REFRESH_PERIOD = 800,
  parameter int unsigned RETENTION      = 213_000,
  parameter bit          EXT_TICK       = 1'b0,
  localparam int unsigned RW            = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned PW            = (XBITS > 1) ? $clog2(XBITS) : 1,
  localparam int unsigned YW            = $clog2(N_IN * (CELL_UNITS + FEEDTHRU)) + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // template port
  input  logic                    w_sdi_even,
  input  logic                    w_sdi_odd,
  input  logic                    w_shift,
  input  logic                    w_write,
  input  logic                    w_read,
  input  logic [RW-1:0]           w_row,
  output logic                    w_sdo_even,
  output logic                    w_sdo_odd,
  // input port
  input  logic                    x_shift,
  input  logic                    x_hold,
  input  logic [XBITS-1:0]        x_din,
  // compute
  input  logic [PW-1:0]           plane,
  output logic [L-1:0]            gray [ROWS],
  // refresh clock shared between chips
  input  logic                    ref_tick_in,
  output logic                    ref_deferred
);

  localparam int unsigned HALF = N_IN / 2;

  initial begin
    assert (N_IN % 2 == 0) else $error("even and odd columns need an even N_IN");
  end

  logic [HALF-1:0]         treg_even, treg_odd, rd_even, rd_odd;
  logic [N_IN-1:0]         wr_data, rd_data, x_bits;
  logic signed [XBITS-1:0] words [N_IN];
  logic signed [YW-1:0]    y [ROWS];
  logic                    ref_en, ref_odd;
  logic [RW-1:0]           ref_row;

  // column interleave: column 2k from the even register, 2k+1 from the odd
  always_comb begin
    for (int k = 0; k < HALF; k++) begin
      wr_data[2*k]   = treg_even[k];
      wr_data[2*k+1] = treg_odd[k];
      rd_even[k]     = rd_data[2*k];
      rd_odd[k]      = rd_data[2*k+1];
    end
    for (int n = 0; n < N_IN; n++) x_bits[n] = words[n][plane];
  end

  template_shift_reg #(.WIDTH(HALF)) u_treg_even (
    .clk, .rst_n, .shift_en(w_shift), .sdi(w_sdi_even), .load_en(w_read),
    .load_data(rd_even), .q(treg_even), .sdo(w_sdo_even));
  template_shift_reg #(.WIDTH(HALF)) u_treg_odd (
    .clk, .rst_n, .shift_en(w_shift), .sdi(w_sdi_odd), .load_en(w_read),
    .load_data(rd_odd), .q(treg_odd), .sdo(w_sdo_odd));

  input_shift_reg #(.N_IN(N_IN), .XBITS(XBITS)) u_xreg (
    .clk, .rst_n, .shift_en(x_shift), .hold(x_hold), .din(x_din),
    .words, .dropped());

  dram_refresh_ctrl #(.ROWS(ROWS), .PERIOD(REFRESH_PERIOD), .EXT_TICK(EXT_TICK)) u_refresh (
    .clk, .rst_n, .tick_in(ref_tick_in), .busy(w_write || w_read), .tick_out(),
    .ref_en, .ref_row, .ref_odd, .deferred(ref_deferred));

  cid_dram_array #(.N_IN(N_IN), .ROWS(ROWS), .SIGNED(1'b0), .CELL_UNITS(CELL_UNITS),
                   .FEEDTHRU(FEEDTHRU), .RETENTION(RETENTION), .YW(YW)) u_array (
    .clk, .rst_n, .wr_en(w_write), .wr_row(w_row), .wr_data, .rd_row(w_row),
    .rd_data, .ref_en, .ref_row, .ref_odd, .x(x_bits), .y);

  for (genvar r = 0; r < ROWS; r++) begin : g_adc
    flash_adc #(.IW(YW), .L(L), .STEP(ADC_STEP), .SIGNED_IN(1'b0)) u_adc (
      .charge(y[r]), .gray(gray[r]));
  end

endmodule
