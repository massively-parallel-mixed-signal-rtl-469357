// cid_dram_array -- BEHAVIOURAL MODEL of the analog CID/DRAM computational
// array (charge-injection-device multiplier with embedded DRAM storage).  It
// is not synthesizable logic: the real part is a field of three-transistor
// analog cells whose outputs are charges summed on row sense lines.
//
// Each of ROWS rows stores N_IN template bits.  Presenting an input bit vector
// x makes every row report the charge collected on its sense line, as an
// integer count of sub-units (CELL_UNITS per active cell):
//   * SIGNED = 0 (Kerneltron I, AND cell, Table 2.1): a cell adds CELL_UNITS
//     when both x and w are 1; every active input line also couples FEEDTHRU
//     sub-units onto every row (input-to-output feed-through), whatever w is.
//   * SIGNED = 1 (Kerneltron II, two AND cells in a differential pair, XOR
//     multiply): bits stand for +1/-1 and a cell adds +CELL_UNITS when w == x
//     and -CELL_UNITS otherwise.  The differential pair cancels feed-through.
// Writing a row (row select plus bit lines) stores a new row of bits.  Stored
// charge leaks: the bits of a half row (even or odd columns, which have
// separate refresh select lines) that has been neither written nor refreshed
// for more than RETENTION cycles are lost and read as "no charge" (AND: w = 0;
// XOR: the pair contributes nothing).  A refresh of a still-valid half row
// restores its retention time; RETENTION = 0 disables the leakage model.
// rd_data gives the stored row for test read-out.  Writes and refreshes take
// effect on the rising clock edge; y follows x and the stored bits
// combinationally (the analog sum settles within the compute cycle).
module cid_dram_array #(
  parameter int unsigned N_IN       = 256,
  parameter int unsigned ROWS       = 128,
  parameter bit          SIGNED     = 1'b1,
  parameter int unsigned CELL_UNITS = 64,
  parameter int unsigned FEEDTHRU   = 0,
  parameter int unsigned RETENTION  = 0,
  parameter int unsigned YW         = 24,
  localparam int unsigned RW        = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // write port: row select and bit lines
  input  logic                  wr_en,
  input  logic [RW-1:0]         wr_row,
  input  logic [N_IN-1:0]       wr_data,
  // test read-out port
  input  logic [RW-1:0]         rd_row,
  output logic [N_IN-1:0]       rd_data,
  // refresh of one half row: even (ref_odd = 0) or odd columns
  input  logic                  ref_en,
  input  logic [RW-1:0]         ref_row,
  input  logic                  ref_odd,
  // compute: input bit vector and per-row sense-line charge
  input  logic [N_IN-1:0]       x,
  output logic signed [YW-1:0]  y [ROWS]
);

  logic [N_IN-1:0] mem     [ROWS];
  logic [31:0]     t_even  [ROWS];
  logic [31:0]     t_odd   [ROWS];
  logic [31:0]     now;

  localparam logic [N_IN-1:0] EVEN_MASK = {(N_IN+1)/2{2'b01}};

  function automatic logic alive(input logic [31:0] t_last, input logic [31:0] t_now);
    return (RETENTION == 0) || ((t_now - t_last) <= RETENTION);
  endfunction

  // Bits that still hold charge in row r.
  function automatic logic [N_IN-1:0] valid_mask(input logic [RW-1:0] r);
    logic [N_IN-1:0] m;
    m = '0;
    if (alive(t_even[r], now)) m = m |  EVEN_MASK;
    if (alive(t_odd[r],  now)) m = m | ~EVEN_MASK;
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= '0;
      for (int r = 0; r < ROWS; r++) begin
        t_even[r] <= '0;
        t_odd[r]  <= '0;
      end
    end else begin
      now <= now + 32'd1;
      if (ref_en) begin
        // a refresh senses and rewrites; charge already lost stays lost
        if (ref_odd) begin
          if (!alive(t_odd[ref_row], now)) mem[ref_row] <= mem[ref_row] & EVEN_MASK;
          t_odd[ref_row] <= now;
        end else begin
          if (!alive(t_even[ref_row], now)) mem[ref_row] <= mem[ref_row] & ~EVEN_MASK;
          t_even[ref_row] <= now;
        end
      end
      if (wr_en) begin
        mem[wr_row]    <= wr_data;
        t_even[wr_row] <= now;
        t_odd[wr_row]  <= now;
      end
    end
  end

  assign rd_data = mem[rd_row] & valid_mask(rd_row);

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      logic [N_IN-1:0] v;
      int unsigned agree, disagree, prod, act;
      v = valid_mask(RW'(r));
      if (SIGNED) begin
        agree    = $countones(~(mem[r] ^ x) & v);
        disagree = $countones( (mem[r] ^ x) & v);
        y[r] = YW'((signed'(agree) - signed'(disagree)) * signed'(CELL_UNITS));
      end else begin
        prod = $countones(mem[r] & x & v);
        act  = $countones(x);
        y[r] = YW'(prod * CELL_UNITS + act * FEEDTHRU);
      end
    end
  end

endmodule
