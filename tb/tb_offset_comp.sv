// Testbench for offset_comp: random processor and reference codes; the
// registered difference must appear one cycle later and hold when en is low.
module tb_offset_comp;
  localparam int R = 8, L = 5;
  logic clk = 0, rst_n = 1, en = 0;
  logic [L-1:0] q_proc [R], q_ref [R];
  logic signed [L:0] d [R];
  int checks = 0, failures = 0;
  int e [R];

  offset_comp #(.ROWS(R), .L(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int r = 0; r < R; r++) begin q_proc[r] = '0; q_ref[r] = '0; end
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      for (int r = 0; r < R; r++) begin
        q_proc[r] = L'($urandom); q_ref[r] = L'($urandom);
        e[r] = int'(q_proc[r]) - int'(q_ref[r]);
      end
      en = 1; @(negedge clk); en = 0;
      for (int r = 0; r < R; r++) begin q_proc[r] = L'($urandom); end
      @(negedge clk);
      for (int r = 0; r < R; r++) begin
        checks++;
        if (int'(d[r]) != e[r]) begin failures++; $display("FAIL row %0d d=%0d exp=%0d", r, d[r], e[r]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
