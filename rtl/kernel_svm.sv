// kernel_svm -- kernel evaluation and support vector decision.
//
// After the array has produced the inner products q[m] between the input and
// the M templates (support vectors), the decision
//   y = sign( sum_m coef[m] * f(q[m]) - bias ),   coef[m] = alpha_m * y_m,
// is formed digitally.  f() is the kernel function, held in a loadable
// look-up table of 2**KA entries addressed by the inner product scaled down
// by 2**QSHIFT, saturated to KA-bit two's complement and offset to an unsigned
// address.  The templates are visited one per clock after `start`; `done`
// is high for one cycle M+1 cycles after start, with `score` (the
// thresholded sum) and `decision` (1 for class +1, score >= 0) valid from
// then until the next start.  The table and coefficients are written
// through lut_we / coef_we when idle.
module kernel_svm #(
  parameter int unsigned M      = 32,
  parameter int unsigned QW     = 16,
  parameter int unsigned KA     = 8,
  parameter int unsigned KW     = 8,
  parameter int unsigned CW     = 8,
  parameter int unsigned QSHIFT = 5,
  parameter int unsigned AW     = 24,
  localparam int unsigned MW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 lut_we,
  input  logic [KA-1:0]        lut_addr,
  input  logic signed [KW-1:0] lut_data,
  input  logic                 coef_we,
  input  logic [MW-1:0]        coef_addr,
  input  logic signed [CW-1:0] coef_data,
  input  logic signed [AW-1:0] bias,
  input  logic                 start,
  input  logic signed [QW-1:0] q [M],
  output logic                 busy,
  output logic                 done,
  output logic signed [AW-1:0] score,
  output logic                 decision
);

  logic signed [KW-1:0] lut  [2**KA];
  logic signed [CW-1:0] coef [M];
  logic signed [AW-1:0] acc;
  logic [MW-1:0]        m;
  logic [KA-1:0]        addr;

  // Saturate q[m] >>> QSHIFT to KA bits and offset to an address.
  always_comb begin
    logic signed [QW-1:0] s;
    s = q[m] >>> QSHIFT;
    if (s > QW'((2**(KA-1)) - 1))      addr = {1'b1, {(KA-1){1'b1}}};
    else if (s < -QW'(2**(KA-1)))      addr = '0;
    else                               addr = {~s[KA-1], s[KA-2:0]};
  end

  always_ff @(posedge clk) begin
    if (lut_we)  lut[lut_addr]   <= lut_data;
    if (coef_we) coef[coef_addr] <= coef_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      m        <= '0;
      acc      <= '0;
      score    <= '0;
      decision <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        m    <= '0;
        acc  <= '0;
      end else if (busy) begin
        acc <= acc + AW'(coef[m] * lut[addr]);
        if (m == MW'(M - 1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          score    <= acc + AW'(coef[m] * lut[addr]) - bias;
          decision <= (acc + AW'(coef[m] * lut[addr]) - bias) >= 0;
        end else begin
          m <= m + 1'b1;
        end
      end
    end
  end

endmodule
