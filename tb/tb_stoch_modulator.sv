// Testbench for stoch_modulator: the serial planes of each column, collected
// over MBITS cycles, must form X - U in two's complement with
// U = X - (collected value) inside the signed (XBITS+EBITS)-bit range and the
// same U for every word (fixed table); the U bits must be near-balanced.
// A second pass checks that the bit planes of all-zero inputs give -U.
module tb_stoch_modulator;
  localparam int N = 64, XB = 8, EB = 4, MB = XB + EB + 1;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  logic [XB-1:0] x_words [N];
  logic [N-1:0] xt_bits;
  logic [3:0] plane;
  logic sign_plane;
  int checks = 0, failures = 0, ones = 0, total = 0;
  int u_first [N];

  stoch_modulator #(.N_IN(N), .XBITS(XB), .EBITS(EB), .SEED(32'hCAFE_F00D)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [MB-1:0] got [N];
    for (int n = 0; n < N; n++) x_words[n] = '0;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < N; n++) x_words[n] = (t == 0) ? '0 : XB'($urandom);
      clear = 1; @(negedge clk); clear = 0;
      for (int p = 0; p < MB; p++) begin
        en = 1; #1;
        checks++;
        if (sign_plane !== (p == MB - 1)) begin failures++; $display("FAIL sign_plane at %0d", p); end
        for (int n = 0; n < N; n++) got[n][p] = xt_bits[n];
        @(negedge clk);
      end
      en = 0;
      for (int n = 0; n < N; n++) begin
        int v, u;
        v = int'($signed(got[n]));
        u = int'(x_words[n]) - v;
        checks++;
        if (u < -(2**(XB+EB-1)) || u > 2**(XB+EB-1) - 1) begin failures++; $display("FAIL U out of range %0d", u); end
        if (t == 0) begin
          u_first[n] = u;
          for (int b = 0; b < XB + EB; b++) begin ones += (u >> b) & 1; total++; end
        end else begin
          checks++;
          if (u != u_first[n]) begin failures++; $display("FAIL U changed n=%0d %0d vs %0d", n, u, u_first[n]); end
        end
      end
    end
    checks++;
    if (ones * 100 < total * 40 || ones * 100 > total * 60) begin failures++; $display("FAIL U bits unbalanced %0d/%0d", ones, total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
