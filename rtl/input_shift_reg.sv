// input_shift_reg -- serial-to-parallel input register.
//
// Input words enter one per clock through din while shift_en is high and move
// one position along the register (word 0 is the newest).  With a scanning
// window over an image, one shift brings in a new pixel for the next
// classification, so a full reload is not needed between neighbouring
// windows.  `hold` blocks shifting (it is high while a conversion uses the
// words); a shift requested during hold is dropped and reported on
// `dropped`.  Asynchronous active-low reset clears the words.
module input_shift_reg #(
  parameter int unsigned N_IN  = 256,
  parameter int unsigned XBITS = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shift_en,
  input  logic                    hold,
  input  logic signed [XBITS-1:0] din,
  output logic signed [XBITS-1:0] words [N_IN],
  output logic                    dropped
);

  assign dropped = shift_en && hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N_IN; n++) words[n] <= '0;
    end else if (shift_en && !hold) begin
      words[0] <= din;
      for (int n = 1; n < N_IN; n++) words[n] <= words[n-1];
    end
  end

endmodule
