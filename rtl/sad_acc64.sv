// sad_acc64: 4x4 SAD accumulator of the 64-PE ME hardware.
//
// In every phase cycle the four PEs of one PE row and four neighbouring
// columns deliver the ADs of one pixel row of a 4x4 sub-block; they are
// added and accumulated over the four phases (phase 0 restarts the sum), so
// after phase 3 the 16 accumulators hold the 16 4x4 SADs of the candidate
// block. Accumulator b belongs to the 4x4 block in raster position b.
//
// Timing: inputs with in_valid and their phase are taken on the clock edge;
// out_valid is high for one cycle after the edge that added phase 3.
//
// Accumulating 4x4 partial SADs over four cycles follows the original 64-PE
// design; the valid/phase interface is this design's choice.
module sad_acc64
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] phase,
  input  pixel_t     ad [4][MB_N],
  output logic       out_valid,
  output sad_t       sad [16]
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int b = 0; b < 16; b++) sad[b] <= '0;
    end else begin
      out_valid <= in_valid && (phase == 2'd3);
      if (in_valid)
        for (int b = 0; b < 16; b++) begin
          sad_t row_sum;
          row_sum = '0;
          for (int c = 0; c < 4; c++) row_sum += SAD_W'(ad[b/4][(b%4)*4 + c]);
          sad[b] <= (phase == 2'd0) ? row_sum : sad[b] + row_sum;
        end
    end

endmodule
