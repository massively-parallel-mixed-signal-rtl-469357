// ds_modulator -- BEHAVIOURAL MODEL of the analog part of one delta-sigma
// algorithmic ADC channel: the invertible, resettable switched-capacitor
// accumulator, the single-bit comparator and the residue sample-and-hold.
// It is an analog circuit and is modelled with real arithmetic.
//
// First-order incremental modulation (one step per asserted `step`):
//   w[0] = 0, y[0] = -1, y[i] = sign(w[i]),  w[i+1] = w[i] + ALPHA*(u[i] - y[i])
// The input u is the row's sense-line charge y_in divided by FULL_SCALE, or 0
// when zero_in is set (the final, input-free cycle of each incremental step),
// or the held residue when use_res is set.  On a step with `last` set the new
// accumulator value is sampled into the hold as residue/ALPHA -- the
// accumulator re-used with its capacitors swapped, so the resampling gain is
// exactly 1/ALPHA whatever the capacitor ratio -- and the accumulator is reset
// for the next incremental step.  `clear` resets the accumulator before a new
// conversion.  y_bit is the comparator decision for the current cycle
// (1 = +1, 0 = -1); it is combinational from the state, as the latched
// comparator is read before the clock edge that integrates.
module ds_modulator #(
  parameter int unsigned YW         = 24,
  parameter int unsigned FULL_SCALE = 256 * 64,
  parameter real         ALPHA      = 0.5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 step,
  input  logic                 last,
  input  logic                 use_res,
  input  logic                 zero_in,
  input  logic signed [YW-1:0] y_in,
  output logic                 y_bit
);

  real  w;       // integrator state
  real  res;     // sample-and-hold (residue scaled by 1/ALPHA)
  logic first;   // first cycle of an incremental step: y = -1
  real  u, yv, wn;

  always_comb begin
    y_bit = first ? 1'b0 : (w >= 0.0);
    yv    = y_bit ? 1.0 : -1.0;
    if (zero_in)      u = 0.0;
    else if (use_res) u = res;
    else              u = real'(y_in) / real'(FULL_SCALE);
    wn = w + ALPHA * (u - yv);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w     <= 0.0;
      res   <= 0.0;
      first <= 1'b1;
    end else if (clear) begin
      w     <= 0.0;
      first <= 1'b1;
    end else if (step) begin
      if (last) begin
        res   <= wn / ALPHA;
        w     <= 0.0;
        first <= 1'b1;
      end else begin
        w     <= wn;
        first <= 1'b0;
      end
    end
  end

endmodule
