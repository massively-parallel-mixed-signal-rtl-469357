// Testbench for kt_stoch (stochastic-encoding multiplier) at reduced size.
// Two instances share the stimulus: one with an 8-bit converter, which never
// clips for 64 inputs, and one with a 4-bit converter, which does.  After a
// calibration conversion (all-zero inputs), every result of the wide
// instance must equal 2 * sum_n W[m][n] * X[n] exactly, where the 8-bit
// templates have bits +1/-1 (W = sum_i 2**(7-i) s_i).  Checks latency (busy
// for 13 cycles), the calibrated flag, that the narrow instance counts
// overflows and that the wide one never does.
module tb_kt_stoch;
  localparam int N = 64, R = 16, IB = 8, XB = 8, M = R / IB, MB = 13;
  localparam int QWA = (8 + IB + 2) + MB, QWB = (4 + IB + 2) + MB;
  logic clk = 0, rst_n = 1;
  logic w_sdi = 0, w_shift = 0, w_write = 0;
  logic [3:0] w_row = '0;
  logic x_shift = 0;
  logic [XB-1:0] x_din = '0;
  logic start = 0, calibrate = 0;
  logic busy_a, done_a, cal_a, busy_b, done_b, cal_b;
  logic signed [QWA-1:0] res_a [M];
  logic signed [QWB-1:0] res_b [M];
  logic [15:0] ovf_a, ovf_b;
  int checks = 0, failures = 0;
  bit s [R][N];
  int X [N];

  kt_stoch #(.N_IN(N), .ROWS(R), .IB(IB), .L(8), .REFRESH_PERIOD(20), .RETENTION(2000)) dut_a (
    .clk, .rst_n, .w_sdi, .w_shift, .w_write, .w_row, .x_shift, .x_din, .start, .calibrate,
    .busy(busy_a), .done(done_a), .calibrated(cal_a), .result(res_a), .ovf_count(ovf_a));
  kt_stoch #(.N_IN(N), .ROWS(R), .IB(IB), .L(4), .REFRESH_PERIOD(20), .RETENTION(2000)) dut_b (
    .clk, .rst_n, .w_sdi, .w_shift, .w_write, .w_row, .x_shift, .x_din, .start, .calibrate,
    .busy(busy_b), .done(done_b), .calibrated(cal_b), .result(res_b), .ovf_count(ovf_b));

  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic convert(bit cal);
    int lat;
    calibrate = cal; start = 1; @(negedge clk); start = 0; calibrate = 0; lat = 1;
    while (!done_a && lat < 100) begin @(negedge clk); lat++; end
    checks++; if (lat != MB + 1) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < R; r++) for (int n = 0; n < N; n++) s[r][n] = $urandom_range(0, 1);
    for (int r = 0; r < R; r++) begin
      for (int n = N - 1; n >= 0; n--) begin w_sdi = s[r][n]; w_shift = 1; @(negedge clk); end
      w_shift = 0; w_row = 4'(r); w_write = 1; @(negedge clk); w_write = 0;
    end
    checks++; if (cal_a) begin failures++; $display("FAIL calibrated before calibration"); end
    convert(1'b1);
    @(negedge clk);
    checks++; if (!cal_a || !cal_b) begin failures++; $display("FAIL calibrated flag"); end
    for (int t = 0; t < 30; t++) begin
      for (int n = 0; n < N; n++) X[n] = (t == 0) ? 255 : $urandom_range(0, 255);
      for (int n = N - 1; n >= 0; n--) begin x_din = XB'(X[n]); x_shift = 1; @(negedge clk); end
      x_shift = 0;
      convert(1'b0);
      for (int m = 0; m < M; m++) begin
        longint e;
        e = 0;
        for (int n = 0; n < N; n++) begin
          int w; w = 0;
          for (int i = 0; i < IB; i++) w += (s[m*IB+i][n] ? 1 : -1) * (2**(IB-1-i));
          e += 2 * w * X[n];
        end
        checks++;
        if (longint'(res_a[m]) != e) begin failures++; $display("FAIL t%0d m%0d got %0d exp %0d", t, m, res_a[m], e); end
      end
    end
    checks++; if (ovf_a != 0) begin failures++; $display("FAIL wide converter overflowed %0d", ovf_a); end
    checks++; if (ovf_b == 0) begin failures++; $display("FAIL narrow converter never overflowed"); end
    $display("INFO overflows narrow=%0d wide=%0d", ovf_b, ovf_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
