// Testbench for input_shift_reg: shifts a known word sequence in and checks
// word positions, the hold behaviour and the dropped flag.
module tb_input_shift_reg;
  localparam int N = 8, XB = 4;
  logic clk = 0, rst_n = 1, shift_en = 0, hold = 0, dropped;
  logic signed [XB-1:0] din = '0;
  logic signed [XB-1:0] words [N];
  logic signed [XB-1:0] expq [$];
  int checks = 0, failures = 0;

  input_shift_reg #(.N_IN(N), .XBITS(XB)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < N; n++) begin checks++; if (words[n] !== 0) begin failures++; $display("FAIL reset word %0d = %0d", n, words[n]); end end
    for (int k = 0; k < 20; k++) begin
      shift_en = 1; din = XB'($urandom); expq.push_front(din);
      @(negedge clk);
    end
    shift_en = 0;
    for (int n = 0; n < N; n++) begin
      checks++;
      if (words[n] !== expq[n]) begin failures++; $display("FAIL word %0d", n); end
    end
    // shift while held: dropped, no change
    hold = 1; shift_en = 1; din = 4'sd3; #1;
    checks++; if (!dropped) begin failures++; $display("FAIL dropped not flagged"); end
    @(negedge clk); shift_en = 0; hold = 0;
    checks++; if (words[0] !== expq[0]) begin failures++; $display("FAIL shifted while held"); end
    #1; checks++; if (dropped) begin failures++; $display("FAIL dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
