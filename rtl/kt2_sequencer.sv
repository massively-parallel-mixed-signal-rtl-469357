// kt2_sequencer -- conversion controller of the Kerneltron II processor.
//
// A start pulse (accepted when idle) launches one matrix-vector
// multiplication.  In the start cycle the modulators and counters are
// cleared.  Then STEPS incremental steps of 2**ELL + 1 modulation cycles each
// follow (2 x 17 = 34 cycles for the 8-bit default):
//   * step 0: cycles 0 .. 2**ELL-1 present unary input bit `unary_idx` to the
//     array and integrate its row outputs; cycle 2**ELL integrates zero input;
//   * steps 1 ..: the held residue is re-converted; the decimating counters
//     shift by ELL on the first cycle of each such step.
// The last cycle of every step samples the residue.  `done` is high for the
// one cycle after the last modulation cycle, when the counters hold the
// result: start in cycle 0 gives done in cycle 1 + STEPS*(2**ELL+1).
module kt2_sequencer
  import kt_pkg::*;
#(
  parameter int unsigned ELL   = 4,
  parameter int unsigned STEPS = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           mod_clear,
  output logic           mod_step,
  output logic           mod_last,
  output logic           mod_use_res,
  output logic           mod_zero_in,
  output logic           cnt_clear,
  output logic           cnt_en,
  output logic           cnt_shift,
  output logic [ELL-1:0] unary_idx
);

  localparam int unsigned CYC = (1 << ELL) + 1;   // modulation cycles per step
  localparam int unsigned SW  = (STEPS > 1) ? $clog2(STEPS) : 1;

  seq_state_e         state;
  logic [ELL:0]       cyc;
  logic [SW-1:0]      stp;
  logic               last_cyc;

  assign last_cyc = (cyc == (ELL+1)'(CYC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEQ_IDLE;
      cyc   <= '0;
      stp   <= '0;
    end else begin
      unique case (state)
        SEQ_IDLE: if (start) begin
          state <= SEQ_CONV;
          cyc   <= '0;
          stp   <= '0;
        end
        SEQ_CONV: begin
          cyc <= last_cyc ? '0 : cyc + 1'b1;
          if (last_cyc) state <= (STEPS > 1) ? SEQ_RES : SEQ_DONE;
        end
        SEQ_RES: begin
          cyc <= last_cyc ? '0 : cyc + 1'b1;
          if (last_cyc) begin
            if (stp == SW'(STEPS - 2)) state <= SEQ_DONE;
            else                       stp   <= stp + 1'b1;
          end
        end
        SEQ_DONE: state <= SEQ_IDLE;
        default:  state <= SEQ_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (state == SEQ_CONV) || (state == SEQ_RES);
    done        = (state == SEQ_DONE);
    mod_clear   = (state == SEQ_IDLE) && start;
    cnt_clear   = mod_clear;
    mod_step    = busy;
    cnt_en      = busy;
    mod_last    = busy && last_cyc;
    mod_zero_in = busy && last_cyc;
    mod_use_res = (state == SEQ_RES);
    cnt_shift   = (state == SEQ_RES) && (cyc == '0);
    unary_idx   = cyc[ELL-1:0];
  end

endmodule
