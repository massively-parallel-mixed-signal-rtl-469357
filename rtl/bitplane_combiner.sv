// bitplane_combiner -- digital reconstruction of multi-bit template results.
//
// A template of IB bits occupies IB array rows (bit planes), most significant
// plane first: row m*IB + i holds bit i of template m, with weight 2**-(i+1).
// The per-row converter results d are combined by shift-and-add into
//   q[m] = sum_i 2**(IB-1-i) * d[m*IB + i],
// i.e. the inner product with the full template scaled by 2**IB.
// Combinational.
module bitplane_combiner #(
  parameter int unsigned M  = 32,
  parameter int unsigned IB = 4,
  parameter int unsigned DW = 12,
  parameter int unsigned QW = DW + IB
) (
  input  logic signed [DW-1:0] d [M*IB],
  output logic signed [QW-1:0] q [M]
);

  always_comb begin
    for (int m = 0; m < M; m++) begin
      logic signed [QW-1:0] acc;
      acc = '0;
      for (int i = 0; i < IB; i++)
        acc = acc + (QW'(d[m*IB + i]) <<< (IB - 1 - i));
      q[m] = acc;
    end
  end

endmodule
