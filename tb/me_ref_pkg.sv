// me_ref_pkg: reference model of full-search variable-block-size ME, used by
// the testbenches to compute expected results independently of the RTL.
//
// sw[row][col] is the 47x47 search window, cur[row][col] the current 16x16
// block. run_search() visits the 32x32 locations in the zigzag order of the
// hardware (column 0 top to bottom, column 1 bottom to top, ...), models
// every PE's absolute-difference circuit including the comparison
// prediction state, and keeps for each of the 41 sub-blocks the first
// location with the smallest SAD. With zigzag = 0 every column is visited
// top to bottom, the order of the 64-PE hardware.
//
// The search order and the prediction rules follow the original design;
// the synthetic test pictures are this package's own choice.
package me_ref_pkg;
  import me_pkg::*;

  int unsigned sw  [SW_N][SW_N];
  int unsigned cur [MB_N][MB_N];

  int unsigned ref_sad [NSUB];
  int          ref_mvx [NSUB];
  int          ref_mvy [NSUB];
  longint unsigned ref_mispred;

  // comparison-prediction state of each PE, kept across searches
  bit          pred   [MB_N][MB_N];
  int unsigned ad_reg [MB_N][MB_N];

  function automatic void reset_pe_state();
    for (int y = 0; y < MB_N; y++)
      for (int x = 0; x < MB_N; x++) begin
        pred[y][x]   = 0;
        ad_reg[y][x] = 0;
      end
  endfunction

  // smooth, textured picture with noise, so that neighbouring pixels are
  // correlated as in video
  function automatic int unsigned picture(int x, int y, int seed);
    int v;
    v = 128 + ((x * 7 + y * 3 + seed) % 64) - 32
        + (((x / 5) + (y / 7) + seed) % 3) * 20 + $urandom_range(0, 6);
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  function automatic int unsigned block_sad(int unsigned ad[MB_N][MB_N],
                                            int x0, int y0, int w, int h);
    int unsigned s;
    s = 0;
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++) s += ad[y][x];
    return s;
  endfunction

  // geometry of sub-block k in me_pkg order: x0, y0, width, height
  function automatic void geometry(int k, output int x0, output int y0,
                                   output int w, output int h);
    int j;
    if (k < IDX_4X8)        begin j = k;             w = 4;  h = 4;  x0 = (j%4)*4; y0 = (j/4)*4; end
    else if (k < IDX_8X4)   begin j = k - IDX_4X8;   w = 4;  h = 8;  x0 = (j%4)*4; y0 = (j/4)*8; end
    else if (k < IDX_8X8)   begin j = k - IDX_8X4;   w = 8;  h = 4;  x0 = (j%2)*8; y0 = (j/2)*4; end
    else if (k < IDX_8X16)  begin j = k - IDX_8X8;   w = 8;  h = 8;  x0 = (j%2)*8; y0 = (j/2)*8; end
    else if (k < IDX_16X8)  begin j = k - IDX_8X16;  w = 8;  h = 16; x0 = j*8;     y0 = 0;       end
    else if (k < IDX_16X16) begin j = k - IDX_16X8;  w = 16; h = 8;  x0 = 0;       y0 = j*8;     end
    else                    begin                    w = 16; h = 16; x0 = 0;       y0 = 0;       end
  endfunction

  function automatic void run_search(ad_mode_e mode, bit chk_board, bit zigzag = 1);
    int unsigned ad [MB_N][MB_N];
    bit first;
    first = 1;
    ref_mispred = 0;
    for (int c = 0; c < NLOC; c++)
      for (int i = 0; i < NLOC; i++) begin
        int r;
        r = (c % 2 == 0 || !zigzag) ? i : NLOC - 1 - i;
        for (int y = 0; y < MB_N; y++)
          for (int x = 0; x < MB_N; x++) begin
            int s, cu, d;
            ad_mode_e m;
            s  = int'(sw[r+y][c+x]);
            cu = int'(cur[y][x]);
            m  = (chk_board && ((x + y) % 2 == 0)) ? AD_STD : mode;
            if (m == AD_STD) begin
              ad_reg[y][x] = (s > cu) ? s - cu : cu - s;
            end else begin
              d = pred[y][x] ? cu - s : s - cu;
              if (d < 0) begin
                ref_mispred++;
                pred[y][x] = !pred[y][x];
                if (m == AD_RADP) ad_reg[y][x] = 0;
              end else begin
                ad_reg[y][x] = d;
              end
            end
            ad[y][x] = ad_reg[y][x];
          end
        for (int k = 0; k < NSUB; k++) begin
          int x0, y0, w, h;
          int unsigned s;
          geometry(k, x0, y0, w, h);
          s = block_sad(ad, x0, y0, w, h);
          if (first || s < ref_sad[k]) begin
            ref_sad[k] = s;
            ref_mvx[k] = c - RANGE;
            ref_mvy[k] = r - RANGE;
          end
        end
        first = 0;
      end
  endfunction

endpackage
