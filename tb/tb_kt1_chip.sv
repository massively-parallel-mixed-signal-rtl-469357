// Testbench for kt1_chip (one Kerneltron I chip) at reduced size and with its
// default ADC step: writes random binary templates through the even/odd
// template registers, shifts in random 4-bit inputs, and for every input bit
// plane checks each row's gray-coded flash ADC output against the expected
// round((64*matches + 4*active_inputs) / STEP), i.e. the AND-cell charge plus
// the feed-through of the active input lines.  Also checks that x_hold
// freezes the input register and that refresh is driven by the external
// tick (no tick, no refresh: data decays after the retention time).
module tb_kt1_chip;
  localparam int N = 20, R = 4, XB = 4, L = 5, FT = 4;
  localparam int STEP = (N * (64 + FT) + 2**L - 2) / (2**L - 1);
  logic clk = 0, rst_n = 1;
  logic w_sdi_even = 0, w_sdi_odd = 0, w_shift = 0, w_write = 0, w_read = 0;
  logic [1:0] w_row = '0;
  logic w_sdo_even, w_sdo_odd;
  logic x_shift = 0, x_hold = 0;
  logic [XB-1:0] x_din = '0;
  logic [1:0] plane = '0;
  logic [L-1:0] gray [R];
  logic ref_tick_in = 0, ref_deferred;
  int checks = 0, failures = 0;
  bit W [R][N];
  int X [N];

  kt1_chip #(.N_IN(N), .ROWS(R), .L(L), .FEEDTHRU(FT), .REFRESH_PERIOD(5),
             .RETENTION(300), .EXT_TICK(1'b1)) dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int expected(int r, int b, bit stored);
    int p, a, c;
    p = 0; a = 0;
    for (int n = 0; n < N; n++) begin
      bit xb; xb = 1'(X[n] >> b);
      a += xb;
      p += (xb && W[r][n] && stored);
    end
    c = (64 * p + FT * a + STEP / 2) / STEP;
    if (c > 2**L - 1) c = 2**L - 1;
    return c;
  endfunction

  task automatic check_planes(string tag, bit stored);
    for (int b = 0; b < XB; b++) begin
      plane = 2'(b); #1;
      for (int r = 0; r < R; r++) begin
        int e; logic [L-1:0] g;
        e = expected(r, b, stored);
        g = L'(e) ^ (L'(e) >> 1);
        checks++;
        if (gray[r] !== g) begin failures++; $display("FAIL %s plane %0d row %0d gray=%b exp=%b", tag, b, r, gray[r], g); end
      end
    end
  endtask

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int r = 0; r < R; r++) for (int n = 0; n < N; n++) W[r][n] = $urandom_range(0, 1);
      for (int n = 0; n < N; n++) X[n] = (t == 0) ? 15 : $urandom_range(0, 15);
      for (int r = 0; r < R; r++) begin
        for (int k = N / 2 - 1; k >= 0; k--) begin
          w_sdi_even = W[r][2*k]; w_sdi_odd = W[r][2*k+1]; w_shift = 1; @(negedge clk);
        end
        w_shift = 0; w_row = 2'(r); w_write = 1; @(negedge clk); w_write = 0;
      end
      for (int n = N - 1; n >= 0; n--) begin x_din = XB'(X[n]); x_shift = 1; @(negedge clk); end
      x_shift = 0;
      check_planes($sformatf("t%0d", t), 1'b1);
      // held input register ignores shifts
      x_hold = 1; x_shift = 1; x_din = 4'd0; @(negedge clk); x_shift = 0; x_hold = 0;
      check_planes($sformatf("hold%0d", t), 1'b1);
    end
    // with refresh ticks every 5 cycles the data survives a long wait
    for (int i = 0; i < 1000; i++) begin ref_tick_in = (i % 5 == 0); @(negedge clk); end
    ref_tick_in = 0;
    check_planes("refreshed", 1'b1);
    // without ticks the stored charge is lost after the retention time
    repeat (400) @(negedge clk);
    check_planes("decayed", 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
