// sad4x4_tree: first adder tree of the ME datapath. It adds the 256
// absolute differences of the PE array into the SADs of the 16 4x4
// sub-blocks of the candidate block.
//
// Stage 1 registers the sum of each 4-pixel row segment of every 4x4 block
// (64 sums of 4 ADs), stage 2 registers the sum of the 4 segments of each
// block. sad[k] belongs to the 4x4 block in raster position k (block column
// k%4, block row k/4).
//
// Timing: two cycles; out_valid follows in_valid by two cycles.
module sad4x4_tree
  import me_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t ad  [MB_N][MB_N],
  output logic   out_valid,
  output sad_t   sad [16]
);

  logic [PIX_W+1:0] seg_q [16][4];
  logic             v1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      out_valid <= v1;
    end

  always_ff @(posedge clk) begin
    for (int b = 0; b < 16; b++)
      for (int r = 0; r < 4; r++) begin
        logic [PIX_W+1:0] s;
        s = '0;
        for (int c = 0; c < 4; c++)
          s += (PIX_W+2)'(ad[(b/4)*4 + r][(b%4)*4 + c]);
        seg_q[b][r] <= s;
      end
    for (int b = 0; b < 16; b++)
      sad[b] <= SAD_W'(seg_q[b][0]) + SAD_W'(seg_q[b][1])
              + SAD_W'(seg_q[b][2]) + SAD_W'(seg_q[b][3]);
  end

endmodule
