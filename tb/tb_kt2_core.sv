// Testbench for kt2_core (Kerneltron II chip) at reduced size.  Loads random
// +1/-1 templates through the serial template port, shifts in random signed
// 4-bit inputs, runs conversions and checks:
//   * every row's result against 32*sum(w*X)/N_IN within +/-2 LSB,
//   * the conversion latency of 2*(16+1) = 34 busy cycles, done on the 35th,
//   * the word-serial output against q[],
//   * that input shifts during a conversion are dropped and flagged,
//   * template read-back through w_read / w_sdo,
//   * that results stay correct after long idle periods (refresh keeps the
//     stored charge alive).
module tb_kt2_core;
  localparam int N = 32, R = 6, RWD = 3;
  logic clk = 0, rst_n = 1;
  logic w_sdi = 0, w_shift = 0, w_write = 0, w_read = 0, w_sdo;
  logic [RWD-1:0] w_row = '0;
  logic x_shift = 0, x_dropped;
  logic signed [3:0] x_din = '0;
  logic start = 0, busy, done, sout_valid, ref_deferred;
  logic signed [11:0] q [R];
  logic signed [11:0] sout;
  logic [RWD-1:0] sout_idx;
  int checks = 0, failures = 0, maxerr = 0, ndrop = 0, ndefer = 0;
  bit w [R][N];
  int x [N];

  kt2_core #(.N_IN(N), .ROWS(R), .REFRESH_PERIOD(10), .RETENTION(300)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (ref_deferred) ndefer++;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic write_templates();
    for (int r = 0; r < R; r++) begin
      for (int n = N - 1; n >= 0; n--) begin
        w_sdi = w[r][n]; w_shift = 1; @(negedge clk);
      end
      w_shift = 0; w_row = RWD'(r); w_write = 1; @(negedge clk); w_write = 0;
    end
  endtask

  task automatic load_inputs();
    for (int n = N - 1; n >= 0; n--) begin
      x_din = 4'(x[n]); x_shift = 1; @(negedge clk);
    end
    x_shift = 0;
  endtask

  task automatic convert_and_check(string tag);
    int lat;
    start = 1; @(negedge clk); start = 0; lat = 1;
    // try to disturb the input register during the conversion
    x_shift = 1; x_din = 4'sd7; #1;
    checks++; if (!x_dropped) begin failures++; $display("FAIL x_dropped not flagged"); end
    else ndrop++;
    @(negedge clk); x_shift = 0; lat++;
    while (!done && lat < 200) begin
      checks++; if (!busy) begin failures++; $display("FAIL busy low at %0d", lat); end
      @(negedge clk); lat++;
    end
    checks++;
    if (lat != 35) begin failures++; $display("FAIL %s latency %0d", tag, lat); end
    for (int r = 0; r < R; r++) begin
      int s, e, err;
      s = 0;
      for (int n = 0; n < N; n++) s += (w[r][n] ? 1 : -1) * x[n];
      e = (32 * s) / N;
      err = int'(q[r]) - e; if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 2) begin failures++; $display("FAIL %s row %0d q=%0d exp=%0d", tag, r, q[r], e); end
    end
    // serial output
    for (int k = 0; k < R; k++) begin
      @(negedge clk);
      checks++;
      if (!sout_valid || sout_idx != RWD'(k) || sout != q[k]) begin
        failures++; $display("FAIL serial k=%0d valid=%0b idx=%0d val=%0d", k, sout_valid, sout_idx, sout);
      end
    end
  endtask

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 12; t++) begin
      for (int r = 0; r < R; r++) for (int n = 0; n < N; n++) w[r][n] = $urandom_range(0, 1);
      for (int n = 0; n < N; n++) x[n] = $urandom_range(0, 14) - 7;
      if (t == 0) for (int n = 0; n < N; n++) begin x[n] = 7; w[0][n] = 1; w[1][n] = 0; end
      if (t == 1) for (int n = 0; n < N; n++) begin x[n] = (n % 2) ? 7 : -7; w[2][n] = n[0]; end
      write_templates();
      load_inputs();
      convert_and_check($sformatf("t%0d", t));
      // template read-back of one row
      begin
        int rr; rr = $urandom_range(0, R - 1);
        w_row = RWD'(rr); w_read = 1; @(negedge clk); w_read = 0;
        for (int n = N - 1; n >= 0; n--) begin
          checks++;
          if (w_sdo !== w[rr][n]) begin failures++; $display("FAIL readback row %0d bit %0d", rr, n); end
          w_shift = 1; w_sdi = 0; @(negedge clk);
        end
        w_shift = 0;
        write_templates();  // restore register-clobbered state is not needed, rows unchanged
      end
      // long idle period: several retention times, refresh must keep data
      if (t % 4 == 3) begin
        repeat (1000) @(negedge clk);
        convert_and_check($sformatf("idle%0d", t));
      end
    end
    checks++; if (ndefer == 0) begin failures++; $display("FAIL refresh never deferred"); end
    $display("INFO max |error| = %0d LSB, dropped=%0d deferred=%0d", maxerr, ndrop, ndefer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
