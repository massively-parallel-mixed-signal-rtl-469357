// offset_comp -- digital offset compensation with a reference processor.
//
// The reference chip of a multi-chip system receives the same inputs and the
// same refresh clock as the processors but stores only zero templates, so its
// quantized partials hold just the input-to-output feed-through offset
// (proportional to the number of active inputs) and the leakage-related
// offset.  Subtracting the reference partial of the same row from a
// processor's partial removes both:
//   d[r] = q_proc[r] - q_ref[r]   (two's complement, one bit wider).
// Registered: d follows its inputs by one clock when en is high.
module offset_comp #(
  parameter int unsigned ROWS = 128,
  parameter int unsigned L    = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [L-1:0]      q_proc [ROWS],
  input  logic [L-1:0]      q_ref  [ROWS],
  output logic signed [L:0] d      [ROWS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) d[r] <= '0;
    end else if (en) begin
      for (int r = 0; r < ROWS; r++)
        d[r] <= signed'({1'b0, q_proc[r]}) - signed'({1'b0, q_ref[r]});
    end
  end

endmodule
