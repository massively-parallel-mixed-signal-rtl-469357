// Testbench for kernel_svm: loads a kernel table (a clipped quadratic, i.e.
// a polynomial kernel) and coefficients, presents random inner products and
// compares score and decision with a reference computed in the testbench,
// including saturation of the table address; checks done arrives M+1
// cycles after start.
module tb_kernel_svm;
  localparam int M = 8, QW = 16, KA = 8, KW = 8, CW = 8, QS = 5, AW = 24;
  logic clk = 0, rst_n = 1;
  logic lut_we = 0, coef_we = 0, start = 0;
  logic [KA-1:0] lut_addr = '0;
  logic signed [KW-1:0] lut_data = '0;
  logic [2:0] coef_addr = '0;
  logic signed [CW-1:0] coef_data = '0;
  logic signed [AW-1:0] bias = '0;
  logic signed [QW-1:0] q [M];
  logic busy, done, decision;
  logic signed [AW-1:0] score;
  int checks = 0, failures = 0, npos = 0, nneg = 0;
  int lut_ref [256];
  int coef_ref [M];

  kernel_svm #(.M(M), .QW(QW), .KA(KA), .KW(KW), .CW(CW), .QSHIFT(QS), .AW(AW)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      int s; s = a - 128;
      lut_ref[a] = (s * s) / 128 - 64;
      lut_we = 1; lut_addr = 8'(a); lut_data = 8'(lut_ref[a]); @(negedge clk);
    end
    lut_we = 0;
    for (int m = 0; m < M; m++) begin
      coef_ref[m] = $urandom_range(0, 200) - 100;
      coef_we = 1; coef_addr = 3'(m); coef_data = 8'(coef_ref[m]); @(negedge clk);
    end
    coef_we = 0;
    for (int t = 0; t < 40; t++) begin
      int acc, lat;
      acc = 0;
      for (int m = 0; m < M; m++) begin
        int qi, s;
        qi = $urandom_range(0, 12000) - 6000;
        q[m] = 16'(qi);
        s = qi >>> QS;
        if (s > 127) s = 127;
        if (s < -128) s = -128;
        acc += coef_ref[m] * lut_ref[s + 128];
      end
      bias = 24'($urandom_range(0, 4000) - 2000);
      acc -= int'(bias);
      start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat != M + 1) begin failures++; $display("FAIL latency %0d", lat); end
      if (int'(score) != acc) begin failures++; $display("FAIL score %0d exp %0d", score, acc); end
      if (decision !== (acc >= 0)) begin failures++; $display("FAIL decision"); end
      if (acc >= 0) npos++; else nneg++;
    end
    checks++; if (npos == 0 || nneg == 0) begin failures++; $display("FAIL one class only"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
