// Testbench for template_shift_reg: serial load of random rows, parallel
// load and serial read-out (MSB first), load priority over shift.
module tb_template_shift_reg;
  localparam int W = 32;
  logic clk = 0, rst_n = 1, shift_en = 0, sdi = 0, load_en = 0, sdo;
  logic [W-1:0] load_data = '0, q, pat, got;
  int checks = 0, failures = 0;

  template_shift_reg #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      pat = {$urandom, $urandom};
      for (int b = W - 1; b >= 0; b--) begin shift_en = 1; sdi = pat[b]; @(negedge clk); end
      shift_en = 0;
      checks++; if (q !== pat) begin failures++; $display("FAIL serial load %h vs %h", q, pat); end
      // parallel load (wins over shift) then serial read-out
      pat = {$urandom, $urandom};
      load_en = 1; load_data = pat; shift_en = 1; @(negedge clk); load_en = 0;
      for (int b = W - 1; b >= 0; b--) begin got[b] = sdo; @(negedge clk); end
      shift_en = 0;
      checks++; if (got !== pat) begin failures++; $display("FAIL read-out %h vs %h", got, pat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
