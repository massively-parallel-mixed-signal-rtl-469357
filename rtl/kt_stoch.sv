// kt_stoch -- stochastic-encoding matrix-vector multiplier.
//
// The inputs X_n (XBITS-bit unsigned) are modulated to X~_n = X_n - U_n with
// pseudo-random U_n (stoch_modulator) and presented to an array of signed
// (XOR-configured) cells one two's-complement plane per cycle, least
// significant first.  Each row's partial inner product is then nearly
// binomial, with a spread of about sqrt(N_IN) cells around zero, so an L-bit
// flash converter with a step of one cell, centred on zero, resolves it
// exactly although L is well below log2(N_IN + 1).  The codes of the IB
// bit-plane rows of a template (bits +1/-1, most significant first) are
// accumulated over the planes by shift-and-accumulate units, the sign plane
// with negative weight, which gives sum_n W_n (2 X~_n + 1).  A calibration
// conversion with all-zero inputs (calibrate high at start) measures the
// input-independent part sum_n W_n (1 - 2 U_n) once and stores it; every later
// result is corrected by it, so result[m] = 2 * sum_n W_n X_n.
// A code at either end of the converter range is counted as an overflow
// (the partial may have been clipped); ovf_count accumulates them.
//
// Interface: template port as in kt2_core (w_sdi, w_shift, w_write, w_row);
// inputs shifted in by x_shift / x_din; start (when idle) -> busy for MBITS
// cycles -> done for one cycle, result[] valid from then on (after a
// calibration, `calibrated` is set and result[] reads zero).
// Unused outputs on purpose: the modulator's plane index (the array only needs
// the modulated bits and the sign-plane flag), the template register's serial
// output (no read-back on this path), the input register's drop flag and the
// refresh controller's timer and deferral flags (no status ports here), and
// the array's read-out port.
module kt_stoch
  import kt_pkg::*;
#(
  parameter int unsigned N_IN           = 1024,
  parameter int unsigned ROWS           = 128,
  parameter int unsigned IB             = 8,
  parameter int unsigned XBITS          = 8,
  parameter int unsigned EBITS          = 4,
  parameter int unsigned L              = 8,
  parameter int unsigned SEED           = 32'h1234_5678,
  parameter int unsigned REFRESH_PERIOD = 800,
  parameter int unsigned RETENTION      = 213_000,
  localparam int unsigned M             = ROWS / IB,
  localparam int unsigned RW            = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned MBITS         = XBITS + EBITS + 1,
  localparam int unsigned YW            = $clog2(N_IN * CELL_UNITS) + 2,
  localparam int unsigned AW            = L + IB + 2,
  localparam int unsigned QW            = AW + MBITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 w_sdi,
  input  logic                 w_shift,
  input  logic                 w_write,
  input  logic [RW-1:0]        w_row,
  input  logic                 x_shift,
  input  logic [XBITS-1:0]     x_din,
  input  logic                 start,
  input  logic                 calibrate,
  output logic                 busy,
  output logic                 done,
  output logic                 calibrated,
  output logic signed [QW-1:0] result [M],
  output logic [15:0]          ovf_count
);

  logic [N_IN-1:0]         treg, xt_bits;
  logic signed [XBITS-1:0] words [N_IN];
  logic [XBITS-1:0]        xin   [N_IN];
  logic signed [YW-1:0]    y     [ROWS];
  logic [L-1:0]            gray  [ROWS];
  logic [L-1:0]            code  [ROWS];
  logic signed [L:0]       d     [ROWS];
  logic signed [QW-1:0]    acc_q [M];
  logic                    ref_en, ref_odd, running, cal_run, sign_plane, ovf;
  logic [RW-1:0]           ref_row;
  logic [$clog2(MBITS+1)-1:0] plane;

  template_shift_reg #(.WIDTH(N_IN)) u_treg (
    .clk, .rst_n, .shift_en(w_shift), .sdi(w_sdi), .load_en(1'b0),
    .load_data('0), .q(treg), .sdo());

  input_shift_reg #(.N_IN(N_IN), .XBITS(XBITS)) u_xreg (
    .clk, .rst_n, .shift_en(x_shift), .hold(running), .din(x_din),
    .words, .dropped());

  // the calibration conversion presents all-zero inputs
  always_comb
    for (int n = 0; n < N_IN; n++) xin[n] = cal_run ? '0 : words[n];

  stoch_modulator #(.N_IN(N_IN), .XBITS(XBITS), .EBITS(EBITS), .SEED(SEED)) u_mod (
    .clk, .rst_n, .clear(start && !running), .en(running), .x_words(xin),
    .xt_bits, .plane, .sign_plane);

  dram_refresh_ctrl #(.ROWS(ROWS), .PERIOD(REFRESH_PERIOD), .EXT_TICK(1'b0)) u_refresh (
    .clk, .rst_n, .tick_in(1'b0), .busy(w_write), .tick_out(),
    .ref_en, .ref_row, .ref_odd, .deferred());

  cid_dram_array #(.N_IN(N_IN), .ROWS(ROWS), .SIGNED(1'b1), .CELL_UNITS(CELL_UNITS),
                   .FEEDTHRU(0), .RETENTION(RETENTION), .YW(YW)) u_array (
    .clk, .rst_n, .wr_en(w_write), .wr_row(w_row), .wr_data(treg),
    .rd_row(w_row), .rd_data(), .ref_en, .ref_row, .ref_odd, .x(xt_bits), .y);

  always_comb begin
    ovf = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      d[r] = signed'({1'b0, code[r]}) - signed'((L+1)'(2**(L-1)));
      if (code[r] == '0 || code[r] == '1) ovf = 1'b1;
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_adc
    flash_adc #(.IW(YW), .L(L), .STEP(CELL_UNITS), .SIGNED_IN(1'b1)) u_adc (
      .charge(y[r]), .gray(gray[r]));
    gray_decoder #(.L(L)) u_dec (.gray(gray[r]), .bin(code[r]));
  end

  for (genvar m = 0; m < M; m++) begin : g_tpl
    logic signed [L:0] dm [IB];
    for (genvar i = 0; i < IB; i++) begin : g_row
      assign dm[i] = d[m*IB + i];
    end
    shift_accumulate #(.IB(IB), .JB(MBITS), .DW(L+1), .AW(AW), .RW(QW)) u_acc (
      .clk, .rst_n, .clear(start && !running), .en(running), .neg(sign_plane),
      .d(dm), .result(acc_q[m]));
  end

  stoch_reconstruct #(.M(M), .QW(QW)) u_rec (
    .clk, .rst_n, .cal_we(done && cal_run), .y_mod(acc_q), .y_out(result),
    .calibrated);

  assign busy = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      cal_run   <= 1'b0;
      done      <= 1'b0;
      ovf_count <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running <= 1'b1;
        cal_run <= calibrate;
      end else if (running) begin
        if (ovf) ovf_count <= ovf_count + 1'b1;
        if (sign_plane) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else if (done) begin
        cal_run <= 1'b0;
      end
    end
  end

endmodule
