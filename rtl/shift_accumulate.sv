// shift_accumulate -- digital post-processing of Kerneltron I partial
// products for one output component (one template of IB bit-plane rows).
//
// Each cycle delivers the quantized partials d[i] of the IB rows for one
// input bit plane, least significant plane first.  Rows are combined by
// fixed shifts (row i has weight 2**(IB-1-i)) into S.  Across cycles a
// right-shifting accumulator performs the radix-2 weighting without a
// multiplier: sum = acc + S (or acc - S when `neg` marks a plane of negative
// weight, the sign plane of a two's-complement input); the low bit of sum
// is final and shifts into the low-word register, and acc <= sum >>> 1.
// After T cycles the result {acc, low bits} equals
//   sum_t 2**t * S_t,
// i.e. eq. sum_i sum_j 2**(IB-1-i) 2**(JB-1-j) Q(i,j) for JB = T planes.
// LSB-first order keeps the accumulator only as wide as one partial sum
// plus growth.  clear starts a new result; result is valid after the JB-th
// enabled cycle.
module shift_accumulate #(
  parameter int unsigned IB = 4,
  parameter int unsigned JB = 4,
  parameter int unsigned DW = 6,
  parameter int unsigned AW = DW + IB + 1,
  parameter int unsigned RW = AW + JB
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 en,
  input  logic                 neg,
  input  logic signed [DW-1:0] d [IB],
  output logic signed [RW-1:0] result
);

  logic signed [AW-1:0] acc, s, sum;
  logic [JB-1:0]        low;

  always_comb begin
    s = '0;
    for (int i = 0; i < IB; i++) s = s + (AW'(d[i]) <<< (IB - 1 - i));
    sum = neg ? acc - s : acc + s;
  end

  assign result = {acc, low};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      low <= '0;
    end else if (clear) begin
      acc <= '0;
      low <= '0;
    end else if (en) begin
      low <= {sum[0], low[JB-1:1]};
      acc <= sum >>> 1;
    end
  end

endmodule
