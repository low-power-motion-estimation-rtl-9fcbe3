// vdsr_mv_compare: decision logic of vector dependent SAD reuse (VDSR) for
// variable-block-size half-pixel ME.
//
// When neighbouring sub-blocks have the same integer-pixel motion vector,
// their half-pixel search windows together form the window of the larger
// block made of them, so the larger block's half-pixel SADs are sums of
// theirs and its own half-pixel search can be switched off. This module
// makes that decision with 20 equality comparators:
//   16 on 4x4 MVs: 8 vertical pairs (4x8 blocks) and 8 horizontal pairs
//      (8x4 blocks); an 8x8 block reuses when both of its 8x4 pairs and its
//      left 4x8 pair are equal, so it needs no comparator of its own;
//    4 on 8x8 MVs: 2 vertical pairs (8x16), 2 horizontal pairs (16x8); the
//      16x16 block reuses when both 16x8 pairs and the left 8x16 pair match.
// hp_en[k] is 1 when sub-block k (me_pkg order) needs its own half-pixel
// search; reuse[k] is its complement. 4x4 blocks always search.
//
// Timing: combinational.
//
// The 20 equality comparisons and the reuse rule follow the original design;
// deriving the 8x8 and 16x16 results from the comparisons of their halves
// and computing the result combinationally are this design's choice.
module vdsr_mv_compare
  import me_pkg::*;
(
  input  mv_t  ip_mv  [NSUB],
  output logic [NSUB-1:0] hp_en,
  output logic [NSUB-1:0] reuse
);

  logic [7:0] eq_v;    // 4x8: 4x4 blocks a and a+4
  logic [7:0] eq_h;    // 8x4: 4x4 blocks a and a+1
  logic [1:0] eq_v8;   // 8x16: 8x8 blocks k and k+2
  logic [1:0] eq_h8;   // 16x8: 8x8 blocks 2k and 2k+1

  always_comb begin
    for (int j = 0; j < 8; j++) begin
      int a, b;
      a = (j/4)*8 + (j%4);
      eq_v[j] = (ip_mv[IDX_4X4 + a] == ip_mv[IDX_4X4 + a + 4]);
      b = (j/2)*4 + (j%2)*2;
      eq_h[j] = (ip_mv[IDX_4X4 + b] == ip_mv[IDX_4X4 + b + 1]);
    end
    for (int k = 0; k < 2; k++) begin
      eq_v8[k] = (ip_mv[IDX_8X8 + k]   == ip_mv[IDX_8X8 + k + 2]);
      eq_h8[k] = (ip_mv[IDX_8X8 + 2*k] == ip_mv[IDX_8X8 + 2*k + 1]);
    end

    reuse = '0;
    for (int j = 0; j < 8; j++) begin
      reuse[IDX_4X8 + j] = eq_v[j];
      reuse[IDX_8X4 + j] = eq_h[j];
    end
    for (int q = 0; q < 4; q++) begin
      int qx, qy;
      qx = q % 2;
      qy = q / 2;
      // 8x4 rows 2qy and 2qy+1 in column qx; left 4x8 of the quadrant
      reuse[IDX_8X8 + q] = eq_h[(2*qy)*2 + qx] && eq_h[(2*qy+1)*2 + qx]
                        && eq_v[qy*4 + 2*qx];
    end
    for (int k = 0; k < 2; k++) begin
      reuse[IDX_8X16 + k] = eq_v8[k];
      reuse[IDX_16X8 + k] = eq_h8[k];
    end
    reuse[IDX_16X16] = eq_h8[0] && eq_h8[1] && eq_v8[0];
    hp_en = ~reuse;
  end

endmodule
