// Testbench for unary_encoder: for random signed inputs, the +1/-1 bits over
// the 2**XBITS cycles must sum to 2*X and form a thermometer (all +1 first).
module tb_unary_encoder;
  localparam int N = 16, XB = 4;
  logic signed [XB-1:0] x_words [N];
  logic [XB-1:0] idx;
  logic [N-1:0] x_bits;
  int checks = 0, failures = 0;
  int sum [N];
  logic seen0 [N];

  unary_encoder #(.N_IN(N), .XBITS(XB)) dut (.*);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int n = 0; n < N; n++) begin
        x_words[n] = (t == 0) ? XB'(n - 8) : XB'($urandom);
        sum[n] = 0; seen0[n] = 0;
      end
      for (int c = 0; c < 2**XB; c++) begin
        idx = XB'(c); #1;
        for (int n = 0; n < N; n++) begin
          sum[n] += x_bits[n] ? 1 : -1;
          if (!x_bits[n]) seen0[n] = 1;
          else if (seen0[n]) begin
            checks++; failures++; $display("FAIL not a thermometer code n=%0d", n);
          end
        end
      end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (sum[n] != 2 * int'(x_words[n])) begin
          failures++; $display("FAIL X=%0d unary sum=%0d", x_words[n], sum[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
