// flash_adc -- BEHAVIOURAL MODEL of one row-parallel gray-code flash ADC of
// Kerneltron I (charge-based correlated-double-sampling comparators whose
// currents are combined by folding circuits and resolved by integrating
// sense amplifiers).  The comparators, folding and sense amplifiers are
// analog; only their ideal transfer function is modelled.
//
// The sense-line charge `charge` (sub-units, see cid_dram_array) is
// quantized to L bits with a uniform step of STEP sub-units, rounding to the
// nearest level and saturating at 2**L - 1; with SIGNED_IN the input is
// two's complement and the range is centred on zero (offset-binary code).
// The code leaves in gray code, as the wired folding encoder produces it.
// Combinational: a flash converter decides in the compute cycle.
module flash_adc #(
  parameter int unsigned IW        = 24,
  parameter int unsigned L         = 5,
  parameter int unsigned STEP      = 1024,
  parameter bit          SIGNED_IN = 1'b0
) (
  input  logic signed [IW-1:0] charge,
  output logic [L-1:0]         gray
);

  logic [L-1:0] code;

  always_comb begin
    longint c;
    c = longint'(charge);
    if (SIGNED_IN) c = c + longint'(STEP) * longint'(2**(L-1));
    if (c < 0) c = 0;
    c = (c + longint'(STEP) / 64'sd2) / longint'(STEP);
    if (c > longint'(2**L - 1)) c = longint'(2**L - 1);
    code = L'(c);
    gray = code ^ (code >> 1);
  end

endmodule
