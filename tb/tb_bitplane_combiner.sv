// Testbench for bitplane_combiner: random signed row results combined with
// binary weights 2**(IB-1-i), compared with an integer sum.
module tb_bitplane_combiner;
  localparam int M = 4, IB = 4, DW = 12, QW = 16;
  logic signed [DW-1:0] d [M*IB];
  logic signed [QW-1:0] q [M];
  int checks = 0, failures = 0;

  bitplane_combiner #(.M(M), .IB(IB), .DW(DW), .QW(QW)) dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int k = 0; k < M*IB; k++) d[k] = DW'($urandom_range(0, 600)) - DW'(300);
      #1;
      for (int m = 0; m < M; m++) begin
        int e; e = 0;
        for (int i = 0; i < IB; i++) e += int'(d[m*IB+i]) * (8 >> i);
        checks++;
        if (int'(q[m]) != e) begin failures++; $display("FAIL m=%0d q=%0d exp=%0d", m, q[m], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
