// Testbench for output_serializer: captures random words and checks that they
// leave in channel order, one per cycle, with valid and index.
module tb_output_serializer;
  localparam int NCH = 8, W = 12;
  logic clk = 0, rst_n = 1, capture = 0, sout_valid;
  logic signed [W-1:0] din [NCH], sout, ref_w [NCH];
  logic [2:0] sout_idx;
  int checks = 0, failures = 0;

  output_serializer #(.NCH(NCH), .W(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int c = 0; c < NCH; c++) din[c] = '0;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      for (int c = 0; c < NCH; c++) begin din[c] = W'($urandom); ref_w[c] = din[c]; end
      capture = 1; @(negedge clk); capture = 0;
      for (int c = 0; c < NCH; c++) din[c] = '0;
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (!sout_valid || sout_idx != 3'(c) || sout !== ref_w[c]) begin
          failures++; $display("FAIL ch %0d valid=%b idx=%0d w=%0d exp=%0d", c, sout_valid, sout_idx, sout, ref_w[c]);
        end
        @(negedge clk);
      end
      checks++; if (sout_valid) begin failures++; $display("FAIL valid after last word"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
