// Testbench for stoch_reconstruct: stores a calibration vector, then checks
// y_out = y_mod - cal for random inputs, and the calibrated flag.
module tb_stoch_reconstruct;
  localparam int M = 8, QW = 24;
  logic clk = 0, rst_n = 1, cal_we = 0, calibrated;
  logic signed [QW-1:0] y_mod [M], y_out [M];
  int checks = 0, failures = 0;
  int cal [M];

  stoch_reconstruct #(.M(M), .QW(QW)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int m = 0; m < M; m++) y_mod[m] = '0;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (calibrated) failures++;
    for (int m = 0; m < M; m++) begin cal[m] = $urandom_range(0, 100000) - 50000; y_mod[m] = QW'(cal[m]); end
    cal_we = 1; @(negedge clk); cal_we = 0;
    checks++; if (!calibrated) begin failures++; $display("FAIL calibrated flag"); end
    for (int t = 0; t < 50; t++) begin
      int v [M];
      for (int m = 0; m < M; m++) begin v[m] = $urandom_range(0, 100000) - 50000; y_mod[m] = QW'(v[m]); end
      #1;
      for (int m = 0; m < M; m++) begin
        checks++;
        if (int'(y_out[m]) != v[m] - cal[m]) begin failures++; $display("FAIL m=%0d", m); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
