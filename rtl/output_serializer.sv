// output_serializer -- word-serial output port of the processor.
//
// capture loads NCH result words in parallel; the words then leave one per
// clock on sout, channel 0 first, with sout_valid high and sout_idx giving
// the channel.  A capture while words are still leaving restarts the stream.
module output_serializer #(
  parameter int unsigned NCH = 128,
  parameter int unsigned W   = 12,
  localparam int unsigned IW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                capture,
  input  logic signed [W-1:0] din [NCH],
  output logic signed [W-1:0] sout,
  output logic                sout_valid,
  output logic [IW-1:0]       sout_idx
);

  logic signed [W-1:0] buf_q [NCH];

  assign sout = buf_q[sout_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sout_valid <= 1'b0;
      sout_idx   <= '0;
      for (int c = 0; c < NCH; c++) buf_q[c] <= '0;
    end else if (capture) begin
      for (int c = 0; c < NCH; c++) buf_q[c] <= din[c];
      sout_valid <= 1'b1;
      sout_idx   <= '0;
    end else if (sout_valid) begin
      if (sout_idx == IW'(NCH - 1)) sout_valid <= 1'b0;
      else                          sout_idx   <= sout_idx + 1'b1;
    end
  end

endmodule
