// pe_array256: 16x16 two-dimensional systolic array of pe256 elements.
//
// PE(x,y) sits in column x and row y (row 0 at the top). While the search
// window is scanned down a column the array shifts up and the 16 new
// search pixels enter the bottom row from row_in; while it is scanned up a
// column the array shifts down and row_in enters the top row. Between two
// columns the array shifts left once and the rightmost column is loaded from
// the temporary register column (tmp_in). After any shift PE(x,y) holds
// search pixel S(c+x, r+y) of the candidate block at location (c, r).
//
// MODE chooses the absolute-difference circuit of the PEs. With CHECKER set,
// only the PEs with x+y odd use MODE and the others keep the exact circuit,
// the checkerboard variants (CR-ADP, CE-ADP). The current macroblock is
// written one row per cycle through cur_we/cur_row/cur_data.
//
// Timing: shift and row_in/tmp_in act on the next clock edge; the 256 ADs of
// the location then held appear one cycle after an edge with ad_en high.
//
// The 16x16 array shifting up, down and left and the checkerboard
// arrangement of standard and predicting PEs follow the original design; the
// row-wide current-block write port is this design's choice.
module pe_array256
  import me_pkg::*;
#(
  parameter ad_mode_e MODE    = AD_STD,
  parameter bit       CHECKER = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  shift_e      shift,
  input  pixel_t      row_in  [MB_N],
  input  pixel_t      tmp_in  [MB_N],
  input  logic        cur_we,
  input  logic [3:0]  cur_row,
  input  pixel_t      cur_data[MB_N],
  input  logic        ad_en,
  output pixel_t      ad      [MB_N][MB_N],   // [row][column]
  output logic [MB_N*MB_N-1:0] mispred
);

  pixel_t srch [MB_N][MB_N];

  for (genvar y = 0; y < MB_N; y++) begin : g_row
    for (genvar x = 0; x < MB_N; x++) begin : g_col
      localparam ad_mode_e PE_MODE = (CHECKER && ((x + y) % 2 == 0)) ? AD_STD : MODE;
      pixel_t below, above, right;
      assign below = (y == MB_N-1) ? row_in[x] : srch[(y+1) % MB_N][x];
      assign above = (y == 0)      ? row_in[x] : srch[(y+MB_N-1) % MB_N][x];
      assign right = (x == MB_N-1) ? tmp_in[y] : srch[y][(x+1) % MB_N];
      pe256 #(.MODE(PE_MODE)) u_pe (
        .clk, .rst_n, .shift,
        .from_below(below), .from_above(above), .from_right(right),
        .cur_we(cur_we && (cur_row == 4'(y))), .cur_in(cur_data[x]),
        .ad_en, .srch(srch[y][x]), .ad(ad[y][x]), .mispred(mispred[y*MB_N + x])
      );
    end
  end

endmodule
