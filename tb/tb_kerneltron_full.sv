// End-to-end testbench for kerneltron_top at the full default sizes
// (256 x 128 Kerneltron II array, three 512 x 128 Kerneltron I chips,
// 1024 x 128 stochastic array), the same checks as the reduced bench, with
// two passes per path and an idle period longer than the 213,000-cycle
// retention time.
//
// Kerneltron II path: random 4-bit templates (bits +1/-1 over four rows) and
// signed 4-bit inputs; checks every row result against 32*sum(w*X)/N within
// 2 LSB, the combined template results against the serial row outputs, the
// 34-cycle conversion, and the kernel classifier score and decision against a
// reference model (done M+1 cycles after the conversion).
// Kerneltron I path: random unsigned 4-bit templates on two chips plus the
// all-zero reference chip; results (in ADC codes) must match the exact inner
// products within the error of one ADC code per row and plane.
// Stochastic path: calibration, then exact 2*sum(W*X) for conversions that
// did not clip.
// Every mechanism is counted and one that never happens is a failure:
// conversions, residue steps, refreshes, refresh deferrals, dropped input
// shifts, serial output words, template read-back, both classifier classes,
// feed-through compensation, calibration.
module tb_kerneltron_full;
  import kt_pkg::*;
  localparam int K2N = 256, K2R = 128, K1P = 2, K1N = 512, K1R = 128, KSN = 1024, KSR = 128;
  localparam int REF2 = 800, RET2 = 213_000, IDLE = 220_000, NT = 2;
  // derived
  localparam int K2M = K2R / 4, K2RW = $clog2(K2R), K2MW = (K2M > 1) ? $clog2(K2M) : 1;
  localparam int K1M = K1R / 4, K1RW = $clog2(K1R), K1CSW = $clog2(K1P + 1);
  localparam int K1QW = KT1_ADC_BITS + 1 + 4 + 1 + 4;
  localparam int K1STEP = (K1N * (CELL_UNITS + 4) + 30) / 31;
  localparam int KSM = KSR / 8, KSRW = $clog2(KSR), KSQW = 18 + 13;

  logic clk = 0, rst_n = 1;
  logic k2_w_sdi = 0, k2_w_shift = 0, k2_w_write = 0, k2_w_read = 0, k2_w_sdo;
  logic [K2RW-1:0] k2_w_row = '0;
  logic k2_x_shift = 0, k2_x_dropped;
  logic signed [3:0] k2_x_din = '0;
  logic k2_start = 0, k2_busy, k2_done, k2_sout_valid, k2_ref_deferred;
  logic signed [11:0] k2_sout;
  logic [K2RW-1:0] k2_sout_idx;
  logic signed [15:0] k2_q [K2M];
  logic k2_lut_we = 0, k2_coef_we = 0;
  logic [7:0] k2_lut_addr = '0;
  logic signed [7:0] k2_lut_data = '0, k2_coef_data = '0;
  logic [K2MW-1:0] k2_coef_addr = '0;
  logic signed [23:0] k2_bias = '0, k2_svm_score;
  logic k2_svm_done, k2_svm_decision;
  logic [K1CSW-1:0] k1_chip_sel = '0;
  logic k1_w_sdi_even = 0, k1_w_sdi_odd = 0, k1_w_shift = 0, k1_w_write = 0, k1_w_read = 0;
  logic [K1RW-1:0] k1_w_row = '0;
  logic k1_w_sdo_even, k1_w_sdo_odd;
  logic k1_x_shift = 0;
  logic [3:0] k1_x_din = '0;
  logic k1_start = 0, k1_busy, k1_done, k1_ref_deferred;
  logic signed [K1QW-1:0] k1_result [K1P*K1M];
  logic ks_w_sdi = 0, ks_w_shift = 0, ks_w_write = 0;
  logic [KSRW-1:0] ks_w_row = '0;
  logic ks_x_shift = 0;
  logic [7:0] ks_x_din = '0;
  logic ks_start = 0, ks_calibrate = 0, ks_busy, ks_done, ks_calibrated;
  logic signed [KSQW-1:0] ks_result [KSM];
  logic [15:0] ks_ovf_count;

  kerneltron_top dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_k2_conv = 0, n_residue = 0, n_refresh = 0, n_defer = 0, n_drop = 0, n_serial = 0,
      n_readback = 0, n_pos = 0, n_neg = 0, n_k1_conv = 0, n_feedthru = 0, n_k1_refresh = 0,
      n_ks_cal = 0, n_ks_conv = 0;
  int cyc = 0, t_k2_done = 0, t_svm_done = 0;
  always @(posedge clk) begin
    cyc++;
    if (k2_done) t_k2_done = cyc;
    if (k2_svm_done) t_svm_done = cyc;
    if (dut.u_kt2.mod_use_res && dut.u_kt2.mod_step) n_residue++;
    if (dut.u_kt2.ref_en) n_refresh++;
    if (k2_ref_deferred) n_defer++;
    if (k2_sout_valid) n_serial++;
    if (dut.u_kt1.ref_tick) n_k1_refresh++;
    if (k1_busy && dut.u_kt1.code[K1P][0] != '0) n_feedthru++;
  end

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endfunction

  // ------------------------------------------------------------ Kerneltron II
  bit k2w [K2R][K2N];
  int k2x [K2N];
  int lut [256];
  int coef [K2M];

  task automatic k2_run(int t);
    int lat, rowq [K2R];
    for (int r = 0; r < K2R; r++) begin
      for (int n = K2N - 1; n >= 0; n--) begin k2_w_sdi = k2w[r][n]; k2_w_shift = 1; @(negedge clk); end
      k2_w_shift = 0; k2_w_row = K2RW'(r); k2_w_write = 1; @(negedge clk); k2_w_write = 0;
    end
    for (int n = K2N - 1; n >= 0; n--) begin k2_x_din = 4'(k2x[n]); k2_x_shift = 1; @(negedge clk); end
    k2_x_shift = 0;
    // bias: large negative, large positive (forcing each class) or random
    case (t % 3)
      0: k2_bias = -24'sd500000;
      1: k2_bias = 24'sd500000;
      default: k2_bias = 24'($urandom_range(0, 60000) - 30000);
    endcase
    k2_start = 1; @(negedge clk); k2_start = 0; lat = 1;
    k2_x_shift = 1; #1; if (k2_x_dropped) n_drop++;
    @(negedge clk); k2_x_shift = 0; lat++;
    while (!k2_done && lat < 200) begin @(negedge clk); lat++; end
    check(lat == 35, $sformatf("k2 latency %0d", lat));
    n_k2_conv++;
    for (int r = 0; r < K2R; r++) begin
      int s, e, err;
      s = 0;
      for (int n = 0; n < K2N; n++) s += (k2w[r][n] ? 1 : -1) * k2x[n];
      e = (32 * s) / K2N;
      rowq[r] = int'(dut.k2_rowq[r]);
      err = rowq[r] - e;
      check(err >= -2 && err <= 2, $sformatf("k2 t%0d row %0d q=%0d exp=%0d", t, r, rowq[r], e));
    end
    // serial words arrive after done; compare with the row results
    for (int k = 0; k < K2R; k++) begin
      @(negedge clk);
      check(k2_sout_valid && int'(k2_sout_idx) == k && int'(k2_sout) == rowq[k],
            $sformatf("k2 serial word %0d", k));
    end
    // combined template results and classifier
    begin
      int acc;
      acc = 0;
      for (int m = 0; m < K2M; m++) begin
        int e, sidx;
        e = 0;
        for (int i = 0; i < 4; i++) e += rowq[m*4 + i] * (2**(3 - i));
        check(int'(k2_q[m]) == e, $sformatf("k2 combine m=%0d %0d vs %0d", m, k2_q[m], e));
        sidx = e >>> 5;
        if (sidx > 127) sidx = 127;
        if (sidx < -128) sidx = -128;
        acc += coef[m] * lut[sidx + 128];
      end
      acc -= int'(k2_bias);
      check(t_svm_done - t_k2_done == K2M + 1, $sformatf("svm latency %0d", t_svm_done - t_k2_done));
      check(int'(k2_svm_score) == acc, $sformatf("svm score %0d exp %0d", k2_svm_score, acc));
      check(k2_svm_decision == (acc >= 0), "svm decision");
      if (k2_svm_decision) n_pos++; else n_neg++;
    end
    // template read-back
    begin
      int rr; rr = $urandom_range(0, K2R - 1);
      // the first time, hold the read for a whole refresh period so that a
      // refresh request meets a busy template port and is deferred
      k2_w_row = K2RW'(rr); k2_w_read = 1;
      repeat ((t == 0) ? REF2 + 1 : 1) @(negedge clk);
      k2_w_read = 0;
      for (int n = K2N - 1; n >= 0; n--) begin
        check(k2_w_sdo == k2w[rr][n], "k2 read-back");
        k2_w_shift = 1; @(negedge clk);
      end
      k2_w_shift = 0; n_readback++;
    end
  endtask

  // ------------------------------------------------------------- Kerneltron I
  int k1w [K1P][K1M][K1N];
  int k1x [K1N];

  function automatic bit k1bit(int c, int row, int n);
    if (c == K1P) return 1'b0;
    return 1'(k1w[c][row / 4][n] >> (3 - row % 4));
  endfunction

  task automatic k1_run(int t);
    int lat;
    for (int c = 0; c <= K1P; c++) begin
      k1_chip_sel = K1CSW'(c);
      for (int row = 0; row < K1R; row++) begin
        for (int k = K1N / 2 - 1; k >= 0; k--) begin
          k1_w_sdi_even = k1bit(c, row, 2*k); k1_w_sdi_odd = k1bit(c, row, 2*k+1);
          k1_w_shift = 1; @(negedge clk);
        end
        k1_w_shift = 0; k1_w_row = K1RW'(row); k1_w_write = 1; @(negedge clk); k1_w_write = 0;
      end
    end
    for (int n = K1N - 1; n >= 0; n--) begin k1_x_din = 4'(k1x[n]); k1_x_shift = 1; @(negedge clk); end
    k1_x_shift = 0;
    k1_start = 1; @(negedge clk); k1_start = 0; lat = 1;
    while (!k1_done && lat < 100) begin @(negedge clk); lat++; end
    check(lat == 6, $sformatf("k1 latency %0d", lat));
    n_k1_conv++;
    for (int p = 0; p < K1P; p++) for (int m = 0; m < K1M; m++) begin
      longint e, got, tol;
      e = 0;
      for (int n = 0; n < K1N; n++) e += k1w[p][m][n] * k1x[n];
      got = longint'(k1_result[p*K1M + m]) * K1STEP;   // in 1/64 cell units
      tol = 225 * K1STEP + 64;
      check(got - 64 * e <= tol && 64 * e - got <= tol,
            $sformatf("k1 t%0d chip %0d tpl %0d code-sum %0d exact %0d", t, p, m, k1_result[p*K1M+m], e));
    end
  endtask

  // ------------------------------------------------------- stochastic encoding
  bit ksw [KSR][KSN];
  int ksx [KSN];

  task automatic ks_convert(bit cal);
    int lat;
    ks_calibrate = cal; ks_start = 1; @(negedge clk); ks_start = 0; ks_calibrate = 0; lat = 1;
    while (!ks_done && lat < 100) begin @(negedge clk); lat++; end
    check(lat == 14, $sformatf("ks latency %0d", lat));
  endtask

  task automatic ks_run(int t);
    logic [15:0] ovf0;
    if (t == 0) begin
      for (int r = 0; r < KSR; r++) begin
        for (int n = KSN - 1; n >= 0; n--) begin ks_w_sdi = ksw[r][n]; ks_w_shift = 1; @(negedge clk); end
        ks_w_shift = 0; ks_w_row = KSRW'(r); ks_w_write = 1; @(negedge clk); ks_w_write = 0;
      end
      ks_convert(1'b1);
      @(negedge clk);
      check(ks_calibrated, "ks calibrated");
      n_ks_cal++;
    end
    for (int n = KSN - 1; n >= 0; n--) begin ks_x_din = 8'(ksx[n]); ks_x_shift = 1; @(negedge clk); end
    ks_x_shift = 0;
    ovf0 = ks_ovf_count;
    ks_convert(1'b0);
    n_ks_conv++;
    if (ks_ovf_count == ovf0) begin
      for (int m = 0; m < KSM; m++) begin
        longint e; e = 0;
        for (int n = 0; n < KSN; n++) begin
          int w; w = 0;
          for (int i = 0; i < 8; i++) w += (ksw[m*8+i][n] ? 1 : -1) * (2**(7-i));
          e += 2 * w * ksx[n];
        end
        check(longint'(ks_result[m]) == e, $sformatf("ks t%0d m%0d got %0d exp %0d", t, m, ks_result[m], e));
      end
    end
  endtask

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // classifier tables: clipped quadratic kernel, random coefficients
    for (int a = 0; a < 256; a++) begin
      lut[a] = ((a - 128) * (a - 128)) / 128 - 64;
      k2_lut_we = 1; k2_lut_addr = 8'(a); k2_lut_data = 8'(lut[a]); @(negedge clk);
    end
    k2_lut_we = 0;
    for (int m = 0; m < K2M; m++) begin
      coef[m] = $urandom_range(0, 200) - 100;
      k2_coef_we = 1; k2_coef_addr = K2MW'(m); k2_coef_data = 8'(coef[m]); @(negedge clk);
    end
    k2_coef_we = 0;
    for (int r = 0; r < KSR; r++) for (int n = 0; n < KSN; n++) ksw[r][n] = $urandom_range(0, 1);
    for (int t = 0; t < NT; t++) begin
      for (int r = 0; r < K2R; r++) for (int n = 0; n < K2N; n++) k2w[r][n] = $urandom_range(0, 1);
      for (int n = 0; n < K2N; n++) k2x[n] = $urandom_range(0, 14) - 7;
      k2_run(t);
      for (int p = 0; p < K1P; p++) for (int m = 0; m < K1M; m++) for (int n = 0; n < K1N; n++)
        k1w[p][m][n] = $urandom_range(0, 15);
      for (int n = 0; n < K1N; n++) k1x[n] = $urandom_range(0, 15);
      k1_run(t);
      for (int n = 0; n < KSN; n++) ksx[n] = $urandom_range(0, 255);
      ks_run(t);
    end
    // stored templates survive an idle period longer than the retention time
    repeat (IDLE) @(negedge clk);
    for (int n = 0; n < K2N; n++) k2x[n] = $urandom_range(0, 14) - 7;
    k2_run(NT);
    check(n_k2_conv > 0, "mechanism: Kerneltron II conversion");
    check(n_residue > 0, "mechanism: residue re-conversion step");
    check(n_refresh > 0, "mechanism: Kerneltron II refresh");
    check(n_defer > 0, "mechanism: refresh deferred by template access");
    check(n_drop > 0, "mechanism: input shift dropped while busy");
    check(n_serial > 0, "mechanism: serial output");
    check(n_readback > 0, "mechanism: template read-back");
    check(n_pos > 0, "mechanism: classifier positive decision");
    check(n_neg > 0, "mechanism: classifier negative decision");
    check(n_k1_conv > 0, "mechanism: Kerneltron I conversion");
    check(n_feedthru > 0, "mechanism: feed-through removed by reference chip");
    check(n_k1_refresh > 0, "mechanism: shared refresh clock");
    check(n_ks_cal > 0, "mechanism: stochastic calibration");
    check(n_ks_conv > 0, "mechanism: stochastic conversion");
    $display("INFO k2_conv=%0d residue=%0d refresh=%0d defer=%0d drop=%0d serial=%0d readback=%0d pos=%0d neg=%0d",
             n_k2_conv, n_residue, n_refresh, n_defer, n_drop, n_serial, n_readback, n_pos, n_neg);
    $display("INFO k1_conv=%0d feedthru=%0d k1_refresh=%0d ks_cal=%0d ks_conv=%0d ks_ovf=%0d",
             n_k1_conv, n_feedthru, n_k1_refresh, n_ks_cal, n_ks_conv, ks_ovf_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
