// Testbench for the cid_dram_array model: random templates and inputs in
// both the signed (XOR) and the unsigned (AND with feed-through) cell
// configuration, compared with a bit-level reference; test read-out; and
// charge loss of a half row that is not refreshed within the retention time
// while a refreshed half row keeps its data.
module tb_cid_dram_array;
  localparam int N = 24, R = 6, U = 64, FT = 3, RET = 40;
  logic clk = 0, rst_n = 1;
  logic wr_en = 0, ref_en = 0, ref_odd = 0;
  logic [2:0] wr_row = '0, rd_row = '0, ref_row = '0;
  logic [N-1:0] wr_data = '0, rd_s, rd_u, x = '0;
  logic signed [23:0] ys [R], yu [R];
  logic [N-1:0] img [R];
  int checks = 0, failures = 0;

  cid_dram_array #(.N_IN(N), .ROWS(R), .SIGNED(1'b1), .CELL_UNITS(U), .RETENTION(RET)) dut_s (
    .clk, .rst_n, .wr_en, .wr_row, .wr_data, .rd_row, .rd_data(rd_s),
    .ref_en, .ref_row, .ref_odd, .x, .y(ys));
  cid_dram_array #(.N_IN(N), .ROWS(R), .SIGNED(1'b0), .CELL_UNITS(U), .FEEDTHRU(FT)) dut_u (
    .clk, .rst_n, .wr_en, .wr_row, .wr_data, .rd_row, .rd_data(rd_u),
    .ref_en(1'b0), .ref_row, .ref_odd, .x, .y(yu));

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic write_all();
    @(negedge clk);
    for (int r = 0; r < R; r++) begin
      img[r] = N'({$urandom, $urandom});
      wr_en = 1; wr_row = 3'(r); wr_data = img[r]; @(negedge clk);
    end
    wr_en = 0;
  endtask

  task automatic check_compute(input logic [N-1:0] lost_mask_row0);
    for (int r = 0; r < R; r++) begin
      int es, eu;
      logic [N-1:0] v;
      v = (r == 0) ? ~lost_mask_row0 : '1;
      es = 0; eu = 0;
      for (int n = 0; n < N; n++) begin
        if (v[n]) es += (img[r][n] == x[n]) ? U : -U;
        if (x[n]) eu += FT + ((img[r][n] && v[n]) ? U : 0);
      end
      checks++;
      if (int'(ys[r]) != es) begin failures++; $display("FAIL signed row %0d y=%0d exp=%0d", r, ys[r], es); end
      if (lost_mask_row0 == '0) begin
        checks++;
        if (int'(yu[r]) != eu) begin failures++; $display("FAIL unsigned row %0d y=%0d exp=%0d", r, yu[r], eu); end
      end
    end
  endtask

  initial begin
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      write_all();
      for (int k = 0; k < 4; k++) begin
        x = N'({$urandom, $urandom}); #1; check_compute('0);
        @(negedge clk);
      end
      for (int r = 0; r < R; r++) begin
        rd_row = 3'(r); #1; checks++;
        if (rd_s !== img[r] || rd_u !== img[r]) begin failures++; $display("FAIL read-out row %0d", r); end
      end
    end
    // retention: rewrite, then refresh only the even half of row 0 (and all
    // of the other rows) until the odd half of row 0 has expired
    write_all();
    @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      for (int r = 0; r < R; r++) begin
        ref_en = 1; ref_row = 3'(r); ref_odd = 1'b0; @(negedge clk);
        if (r != 0) begin ref_odd = 1'b1; @(negedge clk); end
      end
    end
    ref_en = 0;
    x = N'({$urandom, $urandom}); #1;
    check_compute({(N/2){2'b10}});
    rd_row = 3'd0; #1; checks++;
    if (rd_s !== (img[0] & {(N/2){2'b01}})) begin failures++; $display("FAIL decayed read-out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
