// pe_array64: 16 columns x 4 rows of pe64 elements, 64 PEs covering the
// 256 pixels of a candidate block. PE(x,j) holds block rows 4j..4j+3 of
// block column x. In each column the four PEs chain their search registers;
// the bottom PE takes the new search pixel (col_in[x]) on a shift. During a
// fill, fill_pos (0..15) selects which block row of every column is
// written directly from col_in.
//
// Timing: shift, fill and current-pixel writes take effect on the clock
// edge; ad[j][x] is the registered AD of PE(x,j) for the register pair
// selected by phase in the previous cycle.
//
// The 16x4 arrangement and the column chains follow the original 64-PE
// design; the fill addressing is this design's choice.
module pe_array64
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       shift,
  input  logic       fill_we,
  input  logic [3:0] fill_pos,
  input  pixel_t     col_in   [MB_N],
  input  logic       cur_we,
  input  logic [3:0] cur_row,
  input  pixel_t     cur_data [MB_N],
  input  logic [1:0] phase,
  input  logic       ad_en,
  output pixel_t     ad       [4][MB_N]      // [PE row][column]
);

  pixel_t chain [5][MB_N];   // chain[j][x]: shift_out of PE(x,j); chain[4]: new pixel

  for (genvar x = 0; x < MB_N; x++) begin : g_col
    assign chain[4][x] = col_in[x];
    for (genvar j = 0; j < 4; j++) begin : g_pe
      logic [3:0] fwe, cwe;
      always_comb
        for (int i = 0; i < 4; i++) begin
          fwe[i] = fill_we && (fill_pos == 4'(4*j + i));
          cwe[i] = cur_we  && (cur_row  == 4'(4*j + i));
        end
      pe64 u_pe (
        .clk, .rst_n, .shift, .shift_in(chain[j+1][x]), .shift_out(chain[j][x]),
        .fill_we(fwe), .fill_data(col_in[x]), .cur_we(cwe), .cur_in(cur_data[x]),
        .phase, .ad_en, .ad(ad[j][x])
      );
    end
  end

endmodule
