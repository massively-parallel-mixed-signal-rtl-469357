// kt_pkg: constants and types shared by the Kerneltron array processors.
//
// Kerneltron II (the oversampling processor) is the main configuration: a
// 256-input x 128-row array of differential (signed, XOR) charge-injection
// cells with embedded DRAM, one delta-sigma algorithmic ADC per row, 4-bit
// templates split over 4 bit-plane rows, 4-bit inputs presented as 16 unary
// cycles, and 2-step conversion (16 + 1 modulation cycles per step) giving
// 8-bit outputs.  Kerneltron I uses a 512 x 128 array of unsigned (AND) cells
// read by row-parallel gray-code flash ADCs.  Numbers taken from the source
// are marked; the rest are choices of this implementation.
package kt_pkg;

  // ---- Kerneltron II --------------------------------------------------
  localparam int unsigned KT2_N_IN    = 256; // inputs (Table 4.1)
  localparam int unsigned KT2_ROWS    = 128; // array rows = ADC channels
  localparam int unsigned KT2_WBITS   = 4;   // bit-plane rows per template
  localparam int unsigned KT2_XBITS   = 4;   // input word width
  localparam int unsigned KT2_ELL     = 4;   // log2 of modulation cycles per step
  localparam int unsigned KT2_STEPS   = 2;   // algorithmic steps (2 x 4 = 8 bits)

  // ---- Kerneltron I ---------------------------------------------------
  localparam int unsigned KT1_N_IN    = 512; // columns (Section 2.3.2)
  localparam int unsigned KT1_ROWS    = 128; // rows = flash ADCs
  localparam int unsigned KT1_WBITS   = 4;   // I = 4 (Figure 2.2 example)
  localparam int unsigned KT1_XBITS   = 4;   // J = 4 (Figure 2.2 example)
  localparam int unsigned KT1_ADC_BITS = 5;  // 5-bit flash (Figure 3.7 example)

  // Charge of one active cell on the sense line, in sub-units.  Feed-through
  // of an input line onto a row is expressed in the same sub-units.
  localparam int unsigned CELL_UNITS  = 64;

  // Phases of the Kerneltron II conversion sequencer.
  typedef enum logic [1:0] {
    SEQ_IDLE  = 2'd0,   // waiting for start
    SEQ_CONV  = 2'd1,   // first incremental step, array input integrated
    SEQ_RES   = 2'd2,   // residue re-conversion steps
    SEQ_DONE  = 2'd3    // result valid for one cycle
  } seq_state_e;

endpackage
