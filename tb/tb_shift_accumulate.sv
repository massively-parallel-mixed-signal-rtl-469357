// Testbench for shift_accumulate: random signed partials for IB rows over
// JB planes (least significant first), with and without a negative-weight
// last plane; the result must equal sum_t 2**t * s_t * sum_i 2**(IB-1-i) d.
module tb_shift_accumulate;
  localparam int IB = 4, JB = 6, DW = 7;
  localparam int AW = DW + IB + 1, RW = AW + JB;
  logic clk = 0, rst_n = 1, clear = 0, en = 0, neg = 0;
  logic signed [DW-1:0] d [IB];
  logic signed [RW-1:0] result;
  int checks = 0, failures = 0;

  shift_accumulate #(.IB(IB), .JB(JB), .DW(DW), .AW(AW), .RW(RW)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < IB; i++) d[i] = '0;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      longint e;
      logic signmode;
      signmode = t[0];
      e = 0;
      clear = 1; @(negedge clk); clear = 0;
      for (int j = 0; j < JB; j++) begin
        longint s;
        s = 0;
        for (int i = 0; i < IB; i++) begin
          d[i] = DW'($urandom_range(0, 2**DW - 1));
          s += longint'(d[i]) * (2**(IB-1-i));
        end
        neg = signmode && (j == JB - 1);
        e += (neg ? -s : s) * (2**j);
        en = 1; @(negedge clk);
      end
      en = 0; neg = 0;
      checks++;
      if (longint'(result) != e) begin failures++; $display("FAIL result %0d exp %0d", result, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
