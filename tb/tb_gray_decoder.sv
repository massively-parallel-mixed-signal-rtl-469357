// Testbench for gray_decoder: every binary code, converted to gray code in
// the testbench, must decode back to itself.
module tb_gray_decoder;
  localparam int L = 5;
  logic [L-1:0] gray, bin;
  int checks = 0, failures = 0;
  gray_decoder #(.L(L)) dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int v = 0; v < 2**L; v++) begin
      gray = L'(v) ^ (L'(v) >> 1); #1;
      checks++; if (bin != L'(v)) begin failures++; $display("FAIL %0d -> %0d", v, bin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
