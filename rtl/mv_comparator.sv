// mv_comparator: keeps, for each of the 41 sub-blocks, the smallest SAD
// seen during the search of one macroblock and the motion vector where it
// occurred.
//
// clear starts a new macroblock: the next valid location is taken
// unconditionally. After that a location replaces the stored one only if
// its SAD is strictly smaller, so on a tie the location searched first wins.
//
// Timing: one cycle; best_sad/best_mv include a location on the edge after
// it is presented with in_valid high. The tie rule is this design's choice.
module mv_comparator
  import me_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  mv_t  in_mv,
  input  sad_t sad41    [NSUB],
  output sad_t best_sad [NSUB],
  output mv_t  best_mv  [NSUB]
);

  logic first;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      first <= 1'b1;
      for (int k = 0; k < NSUB; k++) begin
        best_sad[k] <= '1;
        best_mv[k]  <= '0;
      end
    end else if (clear) begin
      first <= 1'b1;
    end else if (in_valid) begin
      first <= 1'b0;
      for (int k = 0; k < NSUB; k++)
        if (first || sad41[k] < best_sad[k]) begin
          best_sad[k] <= sad41[k];
          best_mv[k]  <= in_mv;
        end
    end

endmodule
