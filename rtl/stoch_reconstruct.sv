// stoch_reconstruct -- output reconstruction for stochastic input encoding.
//
// The inner products obtained with modulated inputs X~ = X - U contain the
// term -w.U (and any fixed offset of the bit coding).  That term does not
// depend on X, so it is measured once, by converting an all-zero input, and
// kept in a small digital memory (cal_we stores all M values of y_mod).
// Afterwards every result is corrected by subtracting the stored value:
//   y_out[m] = y_mod[m] - cal[m].
// The memory is written on the clock edge; y_out is combinational.
module stoch_reconstruct #(
  parameter int unsigned M  = 32,
  parameter int unsigned QW = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cal_we,
  input  logic signed [QW-1:0] y_mod [M],
  output logic signed [QW-1:0] y_out [M],
  output logic                 calibrated
);

  logic signed [QW-1:0] cal [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      calibrated <= 1'b0;
      for (int m = 0; m < M; m++) cal[m] <= '0;
    end else if (cal_we) begin
      calibrated <= 1'b1;
      for (int m = 0; m < M; m++) cal[m] <= y_mod[m];
    end
  end

  always_comb
    for (int m = 0; m < M; m++) y_out[m] = y_mod[m] - cal[m];

endmodule
