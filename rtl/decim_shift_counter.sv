// decim_shift_counter -- decimator of one delta-sigma algorithmic ADC.
//
// An up/down binary counter accumulates the modulator bits (+1 or -1) over an
// incremental step, which is the rectangular decimation filter of a
// first-order incremental converter.  Before the count of the next step
// (residue re-conversion) begins, the count is shifted left by ELL bits so
// that the previous result is weighted by the 2**ELL cycles of the new step:
//   count = 2**ELL * sum(y) + sum(y').
// The shift is applied on the same edge as the first count of the new step
// (shift and en both high).  clear zeroes the count; count holds when en is
// low.
module decim_shift_counter #(
  parameter int unsigned ELL = 4,
  parameter int unsigned CW  = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 en,
  input  logic                 shift,
  input  logic                 y_bit,
  output logic signed [CW-1:0] count
);

  logic signed [CW-1:0] base;

  always_comb base = shift ? (count <<< ELL) : count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (clear)  count <= '0;
    else if (en)     count <= y_bit ? base + CW'(1) : base - CW'(1);
  end

endmodule
