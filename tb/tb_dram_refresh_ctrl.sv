// Testbench for dram_refresh_ctrl: checks the refresh order (even then odd
// half of each row, wrapping), one refresh per PERIOD cycles when the port is
// free, deferral while busy, and external-tick operation.
module tb_dram_refresh_ctrl;
  localparam int ROWS = 4, PERIOD = 10;
  logic clk = 0, rst_n = 1, busy = 0, tick_in = 0;
  logic tick_out, ref_en, ref_odd, deferred;
  logic [1:0] ref_row;
  logic tick_out2, ref_en2, ref_odd2, deferred2;
  logic [1:0] ref_row2;
  int checks = 0, failures = 0, nref = 0, last_t = -1, ndef = 0, nref2 = 0, cyc = 0;
  int exp_row = 0, exp_odd = 0;

  dram_refresh_ctrl #(.ROWS(ROWS), .PERIOD(PERIOD)) dut (.*);
  dram_refresh_ctrl #(.ROWS(ROWS), .PERIOD(PERIOD), .EXT_TICK(1'b1)) dut_ext (
    .clk, .rst_n, .tick_in, .busy(1'b0), .tick_out(tick_out2), .ref_en(ref_en2),
    .ref_row(ref_row2), .ref_odd(ref_odd2), .deferred(deferred2));

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ref_en) begin
      checks++;
      if (busy) begin failures++; $display("FAIL refresh issued while the port is busy"); end
      if (ref_row != 2'(exp_row) || ref_odd != exp_odd[0]) begin
        failures++; $display("FAIL order row=%0d odd=%0d exp %0d/%0d", ref_row, ref_odd, exp_row, exp_odd);
      end
      if (exp_odd) exp_row = (exp_row + 1) % ROWS;
      exp_odd ^= 1;
      nref++;
    end
    if (deferred) ndef++;
    if (ref_en2) nref2++;
  end

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    repeat (PERIOD * 2 * ROWS * 2) @(negedge clk);
    checks++; if (nref < 2 * 2 * ROWS - 1 || nref > 2 * 2 * ROWS) begin failures++; $display("FAIL %0d refreshes", nref); end
    // busy port: requests wait
    busy = 1; repeat (3 * PERIOD) @(negedge clk);
    checks++; if (ndef == 0) begin failures++; $display("FAIL no deferral seen"); end
    begin
      int nref_prev; nref_prev = nref;
      busy = 0; @(negedge clk); @(negedge clk);
      checks++; if (nref != nref_prev + 1) begin failures++; $display("FAIL deferred refresh not issued once"); end
    end
    // external tick
    for (int k = 0; k < 5; k++) begin tick_in = 1; @(negedge clk); tick_in = 0; repeat (3) @(negedge clk); end
    checks++; if (nref2 != 5) begin failures++; $display("FAIL ext refreshes %0d", nref2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
