// unary_encoder -- oversampled (unary) coding of the input vector.
//
// Each XBITS-bit two's-complement input X_n is presented to the array as a
// run of 2**XBITS signed bits (1 = +1, 0 = -1) over 2**XBITS modulation
// cycles: in cycle `idx` the bit is +1 when idx < X_n + 2**(XBITS-1).  Over the
// whole run the bits sum to 2*X_n, so the delta-sigma converter that
// integrates the array outputs over these cycles accumulates an inner product
// with the input at full word resolution, every unary bit carrying the same
// weight.  Purely combinational: the bits follow idx in the same cycle.
module unary_encoder #(
  parameter int unsigned N_IN  = 256,
  parameter int unsigned XBITS = 4
) (
  input  logic signed [XBITS-1:0] x_words [N_IN],
  input  logic        [XBITS-1:0] idx,
  output logic        [N_IN-1:0]  x_bits
);

  always_comb begin
    for (int n = 0; n < N_IN; n++) begin
      // X + 2**(XBITS-1) as an unsigned count of +1 bits (offset binary)
      logic [XBITS-1:0] ones;
      ones      = {~x_words[n][XBITS-1], x_words[n][XBITS-2:0]};
      x_bits[n] = (idx < ones);
    end
  end

endmodule
