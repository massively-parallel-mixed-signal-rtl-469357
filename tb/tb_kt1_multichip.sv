// Testbench for kt1_multichip (Kerneltron I, two processor chips plus the
// reference chip) at reduced size.  With 16 inputs, a 5-bit flash ADC and an
// ADC step of one cell charge, the feed-through from the active input lines
// is removed exactly by subtracting the reference chip, so every template's
// result must equal the exact unsigned inner product sum_n W[m][n] * X[n]
// (4-bit templates over IB = 4 rows, 4-bit inputs).  Also checks latency
// (busy for XBITS + 1 cycles, done after it), template read-back through
// the selected chip, that the reference chip actually sees feed-through
// (nonzero codes) and that the stored templates survive idle periods longer
// than the retention time thanks to the shared refresh clock.
module tb_kt1_multichip;
  localparam int P = 2, N = 16, R = 8, IB = 4, XB = 4, L = 5, M = R / IB;
  localparam int QW = L + 1 + IB + 1 + XB;
  logic clk = 0, rst_n = 1;
  logic [1:0] chip_sel = '0;
  logic w_sdi_even = 0, w_sdi_odd = 0, w_shift = 0, w_write = 0, w_read = 0;
  logic [2:0] w_row = '0;
  logic w_sdo_even, w_sdo_odd;
  logic x_shift = 0;
  logic [XB-1:0] x_din = '0;
  logic start = 0, busy, done, ref_deferred;
  logic signed [QW-1:0] result [P*M];
  int checks = 0, failures = 0, nft = 0, ndefer = 0;
  int W [P][M][N];
  int X [N];

  kt1_multichip #(.P(P), .N_IN(N), .ROWS(R), .L(L), .ADC_STEP(64),
                  .REFRESH_PERIOD(12), .RETENTION(400)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (ref_deferred) ndefer++;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic bit wbit(int c, int row, int n);
    if (c == P) return 1'b0;                 // reference chip: all-zero templates
    return 1'(W[c][row / IB][n] >> (IB - 1 - row % IB));
  endfunction

  task automatic write_chip(int c);
    chip_sel = 2'(c);
    for (int row = 0; row < R; row++) begin
      for (int k = N / 2 - 1; k >= 0; k--) begin
        w_sdi_even = wbit(c, row, 2 * k); w_sdi_odd = wbit(c, row, 2 * k + 1);
        w_shift = 1; @(negedge clk);
      end
      w_shift = 0; w_row = 3'(row); w_write = 1; @(negedge clk); w_write = 0;
    end
  endtask

  task automatic run(string tag);
    int lat;
    for (int n = N - 1; n >= 0; n--) begin x_din = XB'(X[n]); x_shift = 1; @(negedge clk); end
    x_shift = 0;
    start = 1; @(negedge clk); start = 0; lat = 1;
    while (!done && lat < 100) begin
      if (dut.code[P][0] != '0) nft++;
      @(negedge clk); lat++;
    end
    checks++; if (lat != XB + 2) begin failures++; $display("FAIL %s latency %0d", tag, lat); end
    for (int p = 0; p < P; p++) for (int m = 0; m < M; m++) begin
      int e; e = 0;
      for (int n = 0; n < N; n++) e += W[p][m][n] * X[n];
      checks++;
      if (int'(result[p*M+m]) != e) begin
        failures++; $display("FAIL %s chip %0d tpl %0d got %0d exp %0d", tag, p, m, result[p*M+m], e);
      end
    end
  endtask

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      for (int p = 0; p < P; p++) for (int m = 0; m < M; m++) for (int n = 0; n < N; n++)
        W[p][m][n] = (t == 0) ? 15 : $urandom_range(0, 15);
      for (int n = 0; n < N; n++) X[n] = (t == 0) ? 15 : $urandom_range(0, 15);
      for (int c = 0; c <= P; c++) write_chip(c);
      run($sformatf("t%0d", t));
      // read back row 3 of chip 1
      chip_sel = 2'd1; w_row = 3'd3; w_read = 1; @(negedge clk); w_read = 0;
      for (int k = N / 2 - 1; k >= 0; k--) begin
        checks++;
        if (w_sdo_even !== wbit(1, 3, 2 * k) || w_sdo_odd !== wbit(1, 3, 2 * k + 1)) begin
          failures++; $display("FAIL readback k=%0d", k);
        end
        w_shift = 1; @(negedge clk);
      end
      w_shift = 0;
      if (t % 3 == 2) begin
        repeat (1500) @(negedge clk);
        for (int n = 0; n < N; n++) X[n] = $urandom_range(0, 15);
        // the readback clobbered chip 1's register only, not its array
        run($sformatf("idle%0d", t));
      end
    end
    checks++; if (nft == 0) begin failures++; $display("FAIL reference chip never saw feed-through"); end
    checks++; if (ndefer == 0) begin failures++; $display("FAIL refresh never deferred"); end
    $display("INFO feed-through cycles=%0d deferred=%0d", nft, ndefer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
