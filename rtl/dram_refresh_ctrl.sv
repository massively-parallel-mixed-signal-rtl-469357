// dram_refresh_ctrl -- refresh controller for the CID/DRAM array.
//
// A refresh request arises every PERIOD cycles from an internal timer, or on
// tick_in when EXT_TICK is set (several chips then share one refresh clock,
// so they see the same charge-decay profile).  Each request refreshes one
// half row: the even columns of a row, then its odd columns (separate select
// lines), then the next row, wrapping after the last.  A request waits while
// the array's write/read port is busy (`busy`): `deferred` is high in each
// such waiting cycle and the refresh goes out on the first free cycle.  A full
// sweep of the array takes 2*ROWS*PERIOD cycles, which must stay below the
// retention time of the cells.  tick_out marks the internal timer's requests.
module dram_refresh_ctrl #(
  parameter int unsigned ROWS     = 128,
  parameter int unsigned PERIOD   = 800,
  parameter bit          EXT_TICK = 1'b0,
  localparam int unsigned RW      = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick_in,
  input  logic          busy,
  output logic          tick_out,
  output logic          ref_en,
  output logic [RW-1:0] ref_row,
  output logic          ref_odd,
  output logic          deferred
);

  localparam int unsigned TW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [TW-1:0] timer;
  logic          pending;
  logic          req;

  assign tick_out = (timer == TW'(PERIOD - 1));
  assign req      = EXT_TICK ? tick_in : tick_out;
  assign ref_en   = pending && !busy;
  assign deferred = pending && busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer   <= '0;
      pending <= 1'b0;
      ref_row <= '0;
      ref_odd <= 1'b0;
    end else begin
      timer <= tick_out ? '0 : timer + 1'b1;
      if (ref_en) begin
        ref_odd <= ~ref_odd;
        if (ref_odd) ref_row <= (ref_row == RW'(ROWS - 1)) ? '0 : ref_row + 1'b1;
      end
      if (req)         pending <= 1'b1;
      else if (ref_en) pending <= 1'b0;
    end
  end

endmodule
