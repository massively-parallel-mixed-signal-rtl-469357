// Testbench for kt2_sequencer: checks the 34-cycle schedule of the default
// 2-step, 16+1-cycle conversion: clear with start, unary index 0..15 in the
// first step, zero input and residue sampling on the last cycle of each
// step, counter shift on the first residue cycle, done 35 cycles after start,
// and that a start during a conversion is ignored.
module tb_kt2_sequencer;
  logic clk = 0, rst_n = 1, start = 0;
  logic busy, done, mod_clear, mod_step, mod_last, mod_use_res, mod_zero_in;
  logic cnt_clear, cnt_en, cnt_shift;
  logic [3:0] unary_idx;
  int checks = 0, failures = 0;

  kt2_sequencer #(.ELL(4), .STEPS(2)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic expect_b(input string what, input logic got, input logic exp, input int c);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL cycle %0d %s=%b exp %b", c, what, got, exp); end
  endtask

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int ndone;
      start = 1; #1;
      expect_b("mod_clear", mod_clear, 1, 0);
      expect_b("cnt_clear", cnt_clear, 1, 0);
      @(negedge clk); start = 0;
      ndone = 0;
      for (int c = 1; c <= 36; c++) begin
        int k;
        // a start in the middle must be ignored
        start = (c == 10);
        #1;
        k = (c - 1) % 17;
        expect_b("busy", busy, c <= 34, c);
        expect_b("done", done, c == 35, c);
        if (c <= 34) begin
          expect_b("mod_last", mod_last, k == 16, c);
          expect_b("zero_in", mod_zero_in, k == 16, c);
          expect_b("use_res", mod_use_res, c > 17, c);
          expect_b("cnt_shift", cnt_shift, c == 18, c);
          expect_b("mod_clear", mod_clear, 0, c);
          if (c <= 16) begin
            checks++;
            if (unary_idx != 4'(c - 1)) begin failures++; $display("FAIL idx %0d at %0d", unary_idx, c); end
          end
        end
        if (done) ndone++;
        @(negedge clk);
      end
      start = 0;
      checks++; if (ndone != 1) begin failures++; $display("FAIL done count %0d", ndone); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
