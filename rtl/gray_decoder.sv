// gray_decoder -- converts the gray-code outputs of the flash ADCs to binary.
// Bit k of the binary code is the XOR of gray bits k and above.
// Combinational.
module gray_decoder #(
  parameter int unsigned L = 5
) (
  input  logic [L-1:0] gray,
  output logic [L-1:0] bin
);

  always_comb begin
    bin[L-1] = gray[L-1];
    for (int k = L - 2; k >= 0; k--) bin[k] = bin[k+1] ^ gray[k];
  end

endmodule
