// kt1_multichip -- Kerneltron I multi-chip system with offset compensation.
//
// P processor chips hold different templates (the template space grows with
// the number of chips) and receive the same input vector; one more, identical
// reference chip holds all-zero templates.  All chips share one refresh
// clock, so their cells decay alike.  For each input bit plane, least
// significant first, every chip's flash ADC codes are decoded from gray code,
// the reference chip's code of the same row is subtracted (removing the
// input-dependent feed-through offset and the leakage offset), and each group
// of IB rows of a processor (one template, most significant bit plane first)
// is accumulated by a shift-and-accumulate unit.  After XBITS planes
//   result[p*M + m] = sum_i sum_b 2**(IB-1-i) 2**b * d(p, m*IB+i, b),
// which, with an ADC step of one cell, is the exact inner product of template
// m of chip p (IB-bit unsigned) with the XBITS-bit unsigned input.
//
// Template loading: chip_sel picks the chip (0 .. P-1 processors, P the
// reference) whose template port w_* is active; w_sdo_* read back from that
// chip.  Inputs are broadcast.  Conversion: start (when idle) -> busy for
// XBITS + 1 cycles (planes, then the last accumulation) -> done for one cycle
// with result[] valid until the next start.
module kt1_multichip
  import kt_pkg::*;
#(
  parameter int unsigned P              = 2,
  parameter int unsigned N_IN           = KT1_N_IN,
  parameter int unsigned ROWS           = KT1_ROWS,
  parameter int unsigned IB             = KT1_WBITS,
  parameter int unsigned XBITS          = KT1_XBITS,
  parameter int unsigned L              = KT1_ADC_BITS,
  parameter int unsigned FEEDTHRU       = 4,
  parameter int unsigned ADC_STEP       = (N_IN * (CELL_UNITS + FEEDTHRU) + (2**L) - 2) / ((2**L) - 1),
  parameter int unsigned REFRESH_PERIOD = 800,
  parameter int unsigned RETENTION      = 213_000,
  localparam int unsigned M             = ROWS / IB,
  localparam int unsigned RW            = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CSW           = $clog2(P + 1),
  localparam int unsigned PW            = (XBITS > 1) ? $clog2(XBITS) : 1,
  localparam int unsigned AW            = L + 1 + IB + 1,
  localparam int unsigned QW            = AW + XBITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // template port of the selected chip
  input  logic [CSW-1:0]       chip_sel,
  input  logic                 w_sdi_even,
  input  logic                 w_sdi_odd,
  input  logic                 w_shift,
  input  logic                 w_write,
  input  logic                 w_read,
  input  logic [RW-1:0]        w_row,
  output logic                 w_sdo_even,
  output logic                 w_sdo_odd,
  // broadcast input port
  input  logic                 x_shift,
  input  logic [XBITS-1:0]     x_din,
  // conversion
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic signed [QW-1:0] result [P*M],
  output logic                 ref_deferred
);

  localparam int unsigned NCHIP = P + 1;   // processors and the reference chip

  logic [L-1:0]        gray   [NCHIP][ROWS];
  logic [L-1:0]        code   [NCHIP][ROWS];
  logic signed [L:0]   d      [P][ROWS];
  logic                sdo_e  [NCHIP];
  logic                sdo_o  [NCHIP];
  logic                defer  [NCHIP];
  logic [PW-1:0]       plane;
  logic [PW:0]         cnt;
  logic                running, comp_en, acc_en, acc_clear;
  logic [$clog2(REFRESH_PERIOD+1)-1:0] ref_timer;
  logic                ref_tick;

  // shared refresh clock
  assign ref_tick = (ref_timer == '0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_timer <= '0;
    else        ref_timer <= ref_tick ? $bits(ref_timer)'(REFRESH_PERIOD - 1) : ref_timer - 1'b1;
  end

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    kt1_chip #(.N_IN(N_IN), .ROWS(ROWS), .XBITS(XBITS), .L(L), .FEEDTHRU(FEEDTHRU),
               .ADC_STEP(ADC_STEP), .REFRESH_PERIOD(REFRESH_PERIOD),
               .RETENTION(RETENTION), .EXT_TICK(1'b1)) u_chip (
      .clk, .rst_n,
      .w_sdi_even, .w_sdi_odd,
      .w_shift (w_shift && (chip_sel == CSW'(c))),
      .w_write (w_write && (chip_sel == CSW'(c))),
      .w_read  (w_read  && (chip_sel == CSW'(c))),
      .w_row, .w_sdo_even(sdo_e[c]), .w_sdo_odd(sdo_o[c]),
      .x_shift, .x_hold(running), .x_din, .plane, .gray(gray[c]),
      .ref_tick_in(ref_tick), .ref_deferred(defer[c]));
    for (genvar r = 0; r < ROWS; r++) begin : g_dec
      gray_decoder #(.L(L)) u_dec (.gray(gray[c][r]), .bin(code[c][r]));
    end
  end

  always_comb begin
    w_sdo_even   = sdo_e[0];
    w_sdo_odd    = sdo_o[0];
    ref_deferred = 1'b0;
    for (int c = 0; c < NCHIP; c++) begin
      if (chip_sel == CSW'(c)) begin
        w_sdo_even = sdo_e[c];
        w_sdo_odd  = sdo_o[c];
      end
      ref_deferred = ref_deferred | defer[c];
    end
  end

  // plane sequencing: cnt = 0 .. XBITS-1 present planes (LSB first) and
  // register the compensated codes; accumulation follows one cycle later.
  assign plane     = cnt[PW-1:0];
  assign comp_en   = running && (cnt < (PW+1)'(XBITS));
  assign acc_en    = running && (cnt != '0);
  assign acc_clear = start && !running;
  assign busy      = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cnt     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (acc_clear) begin
        running <= 1'b1;
        cnt     <= '0;
      end else if (running) begin
        if (cnt == (PW+1)'(XBITS)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  for (genvar p = 0; p < P; p++) begin : g_proc
    offset_comp #(.ROWS(ROWS), .L(L)) u_comp (
      .clk, .rst_n, .en(comp_en), .q_proc(code[p]), .q_ref(code[P]), .d(d[p]));
    for (genvar m = 0; m < M; m++) begin : g_tpl
      logic signed [L:0] dm [IB];
      for (genvar i = 0; i < IB; i++) begin : g_row
        assign dm[i] = d[p][m*IB + i];
      end
      shift_accumulate #(.IB(IB), .JB(XBITS), .DW(L+1), .AW(AW), .RW(QW)) u_acc (
        .clk, .rst_n, .clear(acc_clear), .en(acc_en), .neg(1'b0), .d(dm),
        .result(result[p*M + m]));
    end
  end

endmodule
