// vbs_sad_tree: second adder tree. From the 16 4x4 SADs of one search
// location it forms the SADs of all 41 variable-size sub-blocks by SAD
// reuse: larger blocks are sums of the smaller ones they contain.
//
// Stage 1 registers the 4x4 SADs and the 4x8 (vertical pair), 8x4
// (horizontal pair) and 8x8 (four) sums; stage 2 registers those and adds
// the 8x16, 16x8 and 16x16 sums from the 8x8 results. Output order is the
// 41-entry order of me_pkg (IDX_* constants).
//
// Timing: two cycles; out_valid follows in_valid by two cycles.
module vbs_sad_tree
  import me_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  sad_t sad16 [16],
  output logic out_valid,
  output sad_t sad41 [NSUB]
);

  sad_t s1 [36];   // 4x4, 4x8, 8x4, 8x8 after stage 1
  logic v1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      out_valid <= v1;
    end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 16; k++) s1[IDX_4X4 + k] <= sad16[k];
    // 4x8: block column bx (0..3), block row by (0..1)
    for (int k = 0; k < 8; k++)
      s1[IDX_4X8 + k] <= sad16[(k/4)*8 + (k%4)] + sad16[(k/4)*8 + (k%4) + 4];
    // 8x4: block column bx (0..1), block row by (0..3)
    for (int k = 0; k < 8; k++)
      s1[IDX_8X4 + k] <= sad16[(k/2)*4 + (k%2)*2] + sad16[(k/2)*4 + (k%2)*2 + 1];
    // 8x8 quadrants
    for (int k = 0; k < 4; k++) begin
      int b;
      b = (k/2)*8 + (k%2)*2;
      s1[IDX_8X8 + k] <= sad16[b] + sad16[b+1] + sad16[b+4] + sad16[b+5];
    end

    for (int k = 0; k < 36; k++) sad41[k] <= s1[k];
    sad41[IDX_8X16 + 0] <= s1[IDX_8X8 + 0] + s1[IDX_8X8 + 2];
    sad41[IDX_8X16 + 1] <= s1[IDX_8X8 + 1] + s1[IDX_8X8 + 3];
    sad41[IDX_16X8 + 0] <= s1[IDX_8X8 + 0] + s1[IDX_8X8 + 1];
    sad41[IDX_16X8 + 1] <= s1[IDX_8X8 + 2] + s1[IDX_8X8 + 3];
    sad41[IDX_16X16]    <= s1[IDX_8X8 + 0] + s1[IDX_8X8 + 1]
                         + s1[IDX_8X8 + 2] + s1[IDX_8X8 + 3];
  end

endmodule
