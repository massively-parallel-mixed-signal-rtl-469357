// template_shift_reg -- serial load and read-out register for template rows.
//
// Template (support vector) bits for one array row enter serially through
// sdi, one per clock while shift_en is high, moving towards the high end;
// the complete register is then written into a row of the array by the row
// select.  For test read-out, load_en copies a stored row (load_data) into
// the register, and the bits leave serially through sdo (most significant
// bit first) on the following shifts.  load_en has priority over shift_en.
module template_shift_reg #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             sdi,
  input  logic             load_en,
  input  logic [WIDTH-1:0] load_data,
  output logic [WIDTH-1:0] q,
  output logic             sdo
);

  assign sdo = q[WIDTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (load_en)  q <= load_data;
    else if (shift_en) q <= {q[WIDTH-2:0], sdi};
  end

endmodule
