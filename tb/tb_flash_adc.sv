// Testbench for the flash_adc model: sweeps the input charge and checks
// rounding to the nearest step, saturation, gray coding (one bit changes
// between neighbouring codes) and the centred signed mode.
module tb_flash_adc;
  localparam int L = 5, STEP = 64;
  logic signed [23:0] charge;
  logic [L-1:0] gray, gray_s;
  int checks = 0, failures = 0;
  flash_adc #(.IW(24), .L(L), .STEP(STEP)) dut (.*);
  flash_adc #(.IW(24), .L(L), .STEP(STEP), .SIGNED_IN(1'b1)) dut_s (.charge, .gray(gray_s));
  function automatic int g2b(input logic [L-1:0] g);
    logic [L-1:0] b; b[L-1] = g[L-1];
    for (int k = L-2; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return int'(b);
  endfunction
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [L-1:0] prev; prev = '0;
    for (int v = 0; v < 40 * STEP; v += 7) begin
      int e, es;
      charge = 24'(v); #1;
      e = (v + STEP/2) / STEP; if (e > 2**L - 1) e = 2**L - 1;
      es = (v + STEP*16 + STEP/2) / STEP; if (es > 2**L - 1) es = 2**L - 1;
      checks++;
      if (g2b(gray) != e) begin failures++; $display("FAIL v=%0d code=%0d exp=%0d", v, g2b(gray), e); end
      checks++;
      if (g2b(gray_s) != es) begin failures++; $display("FAIL signed v=%0d code=%0d exp=%0d", v, g2b(gray_s), es); end
      checks++;
      if ($countones(gray ^ prev) > 1) begin failures++; $display("FAIL gray step at %0d", v); end
      prev = gray;
    end
    charge = -24'sd2000; #1;
    checks++; if (g2b(gray_s) != 16 - 31) begin
      // -2000/64 = -31.25 -> clipped at code 0
      if (g2b(gray_s) != 0) begin failures++; $display("FAIL negative clip"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
