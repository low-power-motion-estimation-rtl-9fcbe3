// me256_ctrl: control unit of the 256-PE full-search ME hardware.
//
// It walks the 32x32 search locations column by column in a zigzag: down
// the first column, up the second, and so on. Column 0 needs 47 cycles
// (15 to fill the array, then one location per cycle); every later column
// starts with one left-shift cycle and then reads 31 rows. In total the
// search is issued in 47 + 31*32 = 1039 cycles.
//
// Each cycle it issues:
//   rd_en, rd_row, rd_col : the search-window row to read from the 17
//                           memories and the array's left column c (the
//                           temporary registers take column c+16),
//   shift                 : how the PE array and temporary registers move,
//   loc_valid, loc_mv     : a complete candidate block is in the array
//                           after this cycle's shift; loc_mv is its MV,
//   loc_last              : this is the last location of the search.
// These are meant to be delayed by the datapath to the stage that uses them.
// start (while idle) begins a search; busy is high while issuing.
//
// The zigzag column order, the 15-cycle fill and the one-row-per-cycle reads
// follow the original data-flow schedule; the counter structure, the
// start/busy handshake and the location tags are this design's own.
module me256_ctrl
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       rd_en,
  output logic [5:0] rd_row,
  output logic [4:0] rd_col,
  output shift_e     shift,
  output logic       loc_valid,
  output mv_t        loc_mv,
  output logic       loc_last
);

  logic [4:0] col_q;    // search column c
  logic [5:0] step_q;   // cycle within the column

  logic [5:0] col_len;
  assign col_len = (col_q == 5'd0) ? 6'(SW_N) : 6'(NLOC);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy   <= 1'b0;
      col_q  <= '0;
      step_q <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        col_q  <= '0;
        step_q <= '0;
      end
    end else if (step_q == col_len - 6'd1) begin
      step_q <= '0;
      col_q  <= col_q + 5'd1;
      if (col_q == 5'(NLOC-1)) busy <= 1'b0;
    end else begin
      step_q <= step_q + 6'd1;
    end

  logic [4:0] loc_row;

  always_comb begin
    rd_en     = 1'b0;
    rd_row    = '0;
    rd_col    = col_q;
    shift     = SH_HOLD;
    loc_valid = 1'b0;
    loc_row   = '0;
    if (busy) begin
      if (col_q == 5'd0) begin
        // fill and scan down the first column
        rd_en     = 1'b1;
        rd_row    = step_q;
        shift     = SH_UP;
        loc_valid = (step_q >= 6'(MB_N-1));
        loc_row   = 5'(step_q - 6'(MB_N-1));
      end else if (step_q == 6'd0) begin
        // move to the next column
        shift     = SH_LEFT;
        loc_valid = 1'b1;
        loc_row   = col_q[0] ? 5'(NLOC-1) : 5'd0;
      end else if (col_q[0]) begin
        // odd column: scan up (rows 30 .. 0 enter at the top)
        rd_en     = 1'b1;
        rd_row    = 6'(NLOC-1) - step_q;
        shift     = SH_DOWN;
        loc_valid = 1'b1;
        loc_row   = 5'(6'(NLOC-1) - step_q);
      end else begin
        // even column: scan down (rows 16 .. 46 enter at the bottom)
        rd_en     = 1'b1;
        rd_row    = 6'(MB_N-1) + step_q;
        shift     = SH_UP;
        loc_valid = 1'b1;
        loc_row   = 5'(step_q);
      end
    end
    loc_mv.x = MV_W'(signed'({1'b0, col_q}) - RANGE);
    loc_mv.y = MV_W'(signed'({1'b0, loc_row}) - RANGE);
    loc_last = busy && (col_q == 5'(NLOC-1)) && (step_q == 6'(NLOC-1));
  end

endmodule
