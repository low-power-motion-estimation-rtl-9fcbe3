// vdsr_sad_reuse: half-pixel SAD register files and the shared adder of
// vector dependent SAD reuse.
//
// The half-pixel search of a 4x4 block produces one SAD for each of the 8
// half-pixel positions around its integer MV; those SADs are written into
// the 4x4 register file (16 blocks x 8 positions). 8x8 SADs go to the 8x8
// register file (4 x 8), either written from outside (8x8 blocks that were
// searched) or by this module when it forms them by reuse. For a larger
// block whose own search was switched off (see vdsr_mv_compare) a request
// names the block and the half-pixel position; one adder then sums
//   2 4x4 SADs for a 4x8 or 8x4 block, 4 4x4 SADs for an 8x8 block,
//   2 8x8 SADs for an 8x16 or 16x8 block, 4 8x8 SADs for the 16x16 block.
// Results of 8x8 requests are also written back into the 8x8 file.
//
// Timing: the sum for a request appears on sum_* one cycle later. An
// external write and a write-back to the same 8x8 entry in one cycle give
// priority to the write-back. The request interface, the write-back and
// the register-file organisation by position are this design's choices.
module vdsr_sad_reuse
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // 4x4 half-pixel SADs from the half-pixel search
  input  logic       wr4_en,
  input  logic [3:0] wr4_blk,
  input  logic [2:0] wr4_loc,
  input  sad_t       wr4_sad,
  // 8x8 half-pixel SADs of searched 8x8 blocks
  input  logic       wr8_en,
  input  logic [1:0] wr8_blk,
  input  logic [2:0] wr8_loc,
  input  sad_t       wr8_sad,
  // reuse request: block index (me_pkg order, 16..40) and position
  input  logic       req_valid,
  input  logic [5:0] req_blk,
  input  logic [2:0] req_loc,
  output logic       sum_valid,
  output logic [5:0] sum_blk,
  output logic [2:0] sum_loc,
  output sad_t       sum_sad
);

  sad_t rf4 [16][8];
  sad_t rf8 [4][8];

  sad_t op [4];
  sad_t sum;

  always_comb begin
    int j, a;
    j = 0;
    a = 0;
    for (int i = 0; i < 4; i++) op[i] = '0;
    if (int'(req_blk) >= IDX_16X16) begin
      for (int i = 0; i < 4; i++) op[i] = rf8[i][req_loc];
    end else if (int'(req_blk) >= IDX_16X8) begin
      j = int'(req_blk) - IDX_16X8;
      op[0] = rf8[2*j][req_loc];
      op[1] = rf8[2*j+1][req_loc];
    end else if (int'(req_blk) >= IDX_8X16) begin
      j = int'(req_blk) - IDX_8X16;
      op[0] = rf8[j][req_loc];
      op[1] = rf8[j+2][req_loc];
    end else if (int'(req_blk) >= IDX_8X8) begin
      j = int'(req_blk) - IDX_8X8;
      a = (j/2)*8 + (j%2)*2;
      op[0] = rf4[a][req_loc];
      op[1] = rf4[a+1][req_loc];
      op[2] = rf4[a+4][req_loc];
      op[3] = rf4[a+5][req_loc];
    end else if (int'(req_blk) >= IDX_8X4) begin
      j = int'(req_blk) - IDX_8X4;
      a = (j/2)*4 + (j%2)*2;
      op[0] = rf4[a][req_loc];
      op[1] = rf4[a+1][req_loc];
    end else if (int'(req_blk) >= IDX_4X8) begin
      j = int'(req_blk) - IDX_4X8;
      a = (j/4)*8 + (j%4);
      op[0] = rf4[a][req_loc];
      op[1] = rf4[a+4][req_loc];
    end
    sum = op[0] + op[1] + op[2] + op[3];
  end

  logic wb8;
  assign wb8 = req_valid && (int'(req_blk) >= IDX_8X8) && (int'(req_blk) < IDX_8X16);

  always_ff @(posedge clk) begin
    if (wr4_en) rf4[wr4_blk][wr4_loc] <= wr4_sad;
    if (wr8_en) rf8[wr8_blk][wr8_loc] <= wr8_sad;
    if (wb8)    rf8[2'(int'(req_blk) - IDX_8X8)][req_loc] <= sum;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sum_valid <= 1'b0;
      sum_blk   <= '0;
      sum_loc   <= '0;
      sum_sad   <= '0;
    end else begin
      sum_valid <= req_valid;
      if (req_valid) begin
        sum_blk <= req_blk;
        sum_loc <= req_loc;
        sum_sad <= sum;
      end
    end

endmodule
