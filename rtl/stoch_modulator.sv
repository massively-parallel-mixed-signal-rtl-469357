// stoch_modulator -- stochastic input encoding for high-dimensional arrays.
//
// Each XBITS-bit unsigned input X_n has a fixed pseudo-random integer U_n
// subtracted from it, X~_n = X_n - U_n, and X~_n (MBITS-bit two's
// complement, MBITS = XBITS + EBITS + 1) is presented to the array bit-serially,
// least significant plane first.  U_n is uniform over the signed range of
// XBITS + EBITS bits, so each of its bits is a fair coin flip and the array's
// partial inner products become nearly binomial whatever the input: their
// spread shrinks to about sqrt(N) of the full range, which relaxes the
// converter resolution needed.  The subtraction is done per column with one
// full adder (as a subtractor) and one borrow flip-flop, and U_n comes from a
// per-column read-only table (here computed at elaboration from SEED with an
// xorshift generator).  clear starts a new word (borrow 0, plane 0); each en
// advances one plane.  xt_bits is the current plane, combinational from the
// plane count, the inputs and the borrows; sign_plane marks the last (sign,
// negative-weight) plane.
module stoch_modulator #(
  parameter int unsigned N_IN  = 1024,
  parameter int unsigned XBITS = 8,
  parameter int unsigned EBITS = 4,
  parameter int unsigned SEED  = 32'h1234_5678,
  localparam int unsigned MBITS = XBITS + EBITS + 1,
  localparam int unsigned TW    = $clog2(MBITS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [XBITS-1:0] x_words [N_IN],
  output logic [N_IN-1:0]  xt_bits,
  output logic [TW-1:0]    plane,
  output logic             sign_plane
);

  // U_n: low XBITS+EBITS bits pseudo-random, sign-extended to MBITS bits.
  function automatic logic [MBITS-1:0] u_rom(input int unsigned n);
    logic [31:0] s;
    s = SEED ^ (32'h9E37_79B9 * (n + 1));
    for (int k = 0; k < 3; k++) begin
      s = s ^ (s << 13);
      s = s ^ (s >> 17);
      s = s ^ (s << 5);
    end
    return MBITS'(signed'(s[XBITS+EBITS-1:0]));
  endfunction

  logic [N_IN-1:0] borrow;
  logic [N_IN-1:0] ub, xb, bnext;

  assign sign_plane = (plane == TW'(MBITS - 1));

  for (genvar n = 0; n < N_IN; n++) begin : g_col
    localparam logic [MBITS-1:0] U = u_rom(n);
    assign ub[n]      = U[plane];
    assign xb[n]      = (plane < TW'(XBITS)) ? x_words[n][plane[$clog2(XBITS)-1:0]] : 1'b0;
    assign xt_bits[n] = xb[n] ^ ub[n] ^ borrow[n];
    assign bnext[n]   = (~xb[n] & ub[n]) | (~(xb[n] ^ ub[n]) & borrow[n]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      borrow <= '0;
      plane  <= '0;
    end else if (clear) begin
      borrow <= '0;
      plane  <= '0;
    end else if (en) begin
      borrow <= bnext;
      plane  <= (plane == TW'(MBITS - 1)) ? '0 : plane + 1'b1;
    end
  end

endmodule
