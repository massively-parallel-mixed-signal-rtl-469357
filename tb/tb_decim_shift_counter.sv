// Testbench for decim_shift_counter: drives random modulator bits over two
// counting steps with a shift between them and compares the count with a
// reference sum 2**ELL * sum(y) + sum(y') kept in the testbench.
module tb_decim_shift_counter;
  localparam int ELL = 4, CW = 12;
  logic clk = 0, rst_n = 1, clear = 0, en = 0, shift = 0, y_bit = 0;
  logic signed [CW-1:0] count;
  int checks = 0, failures = 0;
  int ref_cnt;

  decim_shift_counter #(.ELL(ELL), .CW(CW)) dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    #1 rst_n = 0; repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 50; trial++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      ref_cnt = 0;
      for (int s = 0; s < 2; s++) begin
        for (int c = 0; c < 17; c++) begin
          en = 1; shift = (s == 1 && c == 0); y_bit = $urandom_range(0, 1);
          if (shift) ref_cnt = ref_cnt * 16;
          ref_cnt += y_bit ? 1 : -1;
          @(negedge clk);
        end
      end
      en = 0; shift = 0;
      // hold: extra cycles do not change the count
      repeat (3) @(negedge clk);
      checks++;
      if (count !== CW'(ref_cnt)) begin
        failures++; $display("FAIL trial %0d count=%0d expected=%0d", trial, count, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
