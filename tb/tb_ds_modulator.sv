// Testbench for the ds_modulator model with a reference decimator in the
// testbench: two-step algorithmic conversion (16+1 cycles integrating the
// input, 16+1 cycles re-converting the residue) of constant and varying
// inputs.  The 8-bit result 16*sum(y) + sum(y') must lie within 2 LSB of
// 256 * mean(u), for the nominal capacitor ratio (alpha = 0.5) and a
// mismatched one (alpha = 0.43): the residue gain 1/alpha tracks alpha.
// A single 257-cycle incremental conversion is also checked.
module tb_ds_modulator;
  localparam int FS = 1000;
  logic clk = 0, rst_n = 1, clear = 0, step = 0, last = 0, use_res = 0, zero_in = 0;
  logic signed [23:0] y_in = '0;
  logic y0, y1;
  int checks = 0, failures = 0;

  ds_modulator #(.YW(24), .FULL_SCALE(FS), .ALPHA(0.5))  dut0 (.clk, .rst_n, .clear, .step, .last, .use_res, .zero_in, .y_in, .y_bit(y0));
  ds_modulator #(.YW(24), .FULL_SCALE(FS), .ALPHA(0.43)) dut1 (.clk, .rst_n, .clear, .step, .last, .use_res, .zero_in, .y_in, .y_bit(y1));

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // runs one conversion of the sequence u[0..15] (units of 1/FS)
  task automatic convert(input int u [16], input int ncyc, output int d0, output int d1, output real ideal);
    int s0, s1;
    real acc;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    s0 = 0; s1 = 0; acc = 0;
    for (int c = 0; c <= ncyc; c++) begin
      step = 1; use_res = 0; zero_in = (c == ncyc); last = (c == ncyc);
      y_in = (c < ncyc) ? 24'(u[c % 16]) : '0;
      if (c < ncyc) acc += real'(u[c % 16]) / FS;
      #1; s0 += y0 ? 1 : -1; s1 += y1 ? 1 : -1;
      @(negedge clk);
    end
    if (ncyc == 16) begin
      s0 *= 16; s1 *= 16;
      for (int c = 0; c <= 16; c++) begin
        step = 1; use_res = 1; zero_in = (c == 16); last = (c == 16);
        #1; s0 += y0 ? 1 : -1; s1 += y1 ? 1 : -1;
        @(negedge clk);
      end
      ideal = acc * 16.0;
    end else begin
      ideal = acc;
    end
    step = 0; last = 0; use_res = 0; zero_in = 0;
    d0 = s0; d1 = s1;
  endtask

  initial begin
    int u [16];
    int d0, d1;
    real ideal;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int base;
      base = $urandom_range(0, 1800) - 900;
      for (int k = 0; k < 16; k++) u[k] = (t % 2) ? base : $urandom_range(0, 1800) - 900;
      convert(u, 16, d0, d1, ideal);
      checks += 2;
      if ((real'(d0) - ideal) > 2.0 || (ideal - real'(d0)) > 2.0) begin
        failures++; $display("FAIL alpha=0.5 d=%0d ideal=%f", d0, ideal); end
      if ((real'(d1) - ideal) > 2.0 || (ideal - real'(d1)) > 2.0) begin
        failures++; $display("FAIL alpha=0.43 d=%0d ideal=%f", d1, ideal); end
    end
    // incremental conversion, 256 cycles + 1
    for (int t = 0; t < 5; t++) begin
      int c0;
      c0 = $urandom_range(0, 1800) - 900;
      for (int k = 0; k < 16; k++) u[k] = c0;
      convert(u, 256, d0, d1, ideal);
      checks++;
      if ((real'(d0) - ideal) > 2.0 || (ideal - real'(d0)) > 2.0) begin
        failures++; $display("FAIL incremental d=%0d ideal=%f", d0, ideal); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
