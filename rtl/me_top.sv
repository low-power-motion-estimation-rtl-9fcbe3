// me_top: low-power motion estimation subsystem.
//
// Integer-pixel stage: me256_core, the 256-PE variable-block-size
// full-search ME, finds for a 16x16 macroblock the best integer motion
// vector of each of the 41 H.264 sub-blocks in a [-16, 15] window. Its PEs
// use the absolute-difference circuit chosen by MODE/CHECKER; the default
// is enable-based comparison prediction (E-ADP) in every PE.
//
// Half-pixel preparation: from those 41 integer MVs
//   * vdsr_mv_compare flags (hp_en) which larger sub-blocks need their own
//     half-pixel search and which can take their half-pixel SADs as sums of
//     smaller blocks' SADs (vector dependent SAD reuse);
//   * after each search, a sequencer passes the 41 MVs one per cycle through
//     vtbs_trajectory, which decides 1-D (x or y) or 2-D half-pixel search
//     for each sub-block (traj_* stream, in me_pkg sub-block order).
// The half-pixel interpolation and search engine that consumes these
// decisions is outside this module; the SAD-reuse register files and adder
// (vdsr_sad_reuse) and the six-tap interpolation filter (hp_fir6) it uses
// are included with their ports brought out.
//
// The 64-PE engine (me64_core), the smaller and slower alternative to the
// 256-PE engine, stands beside it with its own ports (*64*); it is
// independent of the rest.
//
// Timing: see me256_core for loading and searching. traj_valid is high for
// 41 consecutive cycles starting two cycles after done.
//
// The way the parts connect follows the original design; running E-ADP in
// the variable-block-size engine by default, the one-sub-block-per-cycle
// trajectory stream and bringing the SAD-reuse and filter ports out
// unconnected are this design's choices.
module me_top
  import me_pkg::*;
#(
  parameter ad_mode_e     MODE    = AD_EADP,
  parameter bit           CHECKER = 1'b0,
  parameter traj_method_e METHOD  = TR_BT
) (
  input  logic       clk,
  input  logic       rst_n,
  // integer-pixel ME
  input  logic       sw_we,
  input  logic [5:0] sw_col,
  input  logic [5:0] sw_row,
  input  pixel_t     sw_pix,
  input  logic       cur_we,
  input  logic [3:0] cur_row,
  input  pixel_t     cur_data [MB_N],
  input  logic       start,
  output logic       busy,
  output logic       done,
  output sad_t       best_sad [NSUB],
  output mv_t        best_mv  [NSUB],
  output logic [31:0] mispred_cnt,
  // half-pixel ME decisions
  output logic [NSUB-1:0] hp_en,
  output logic       traj_valid,
  output logic [5:0] traj_blk,
  output logic       traj_hp_en,
  output hp_mode_e   traj_mode,
  output logic [7:0] traj_loc_mask,
  // SAD reuse register files and adder
  input  logic       wr4_en,
  input  logic [3:0] wr4_blk,
  input  logic [2:0] wr4_loc,
  input  sad_t       wr4_sad,
  input  logic       wr8_en,
  input  logic [1:0] wr8_blk,
  input  logic [2:0] wr8_loc,
  input  sad_t       wr8_sad,
  input  logic       req_valid,
  input  logic [5:0] req_blk,
  input  logic [2:0] req_loc,
  output logic       sum_valid,
  output logic [5:0] sum_blk,
  output logic [2:0] sum_loc,
  output sad_t       sum_sad,
  // half-pixel interpolation filter
  input  logic       fir_in_valid,
  input  pixel_t     fir_tap [6],
  output logic       fir_out_valid,
  output pixel_t     fir_half,
  // 64-PE integer-pixel ME (alternative smaller engine, own ports)
  input  logic       sw64_we,
  input  logic [5:0] sw64_col,
  input  logic [5:0] sw64_row,
  input  pixel_t     sw64_pix,
  input  logic       cur64_we,
  input  logic [3:0] cur64_row,
  input  pixel_t     cur64_data [MB_N],
  input  logic       start64,
  output logic       busy64,
  output logic       done64,
  output sad_t       best64_sad [NSUB],
  output mv_t        best64_mv  [NSUB]
);

  me256_core #(.MODE(MODE), .CHECKER(CHECKER)) u_ime (
    .clk, .rst_n, .sw_we, .sw_col, .sw_row, .sw_pix,
    .cur_we, .cur_row, .cur_data, .start, .busy, .done,
    .best_sad, .best_mv, .mispred_cnt
  );

  vdsr_mv_compare u_vdsr_cmp (.ip_mv(best_mv), .hp_en, .reuse());

  // Trajectory sequencer: one sub-block per cycle after each search.
  logic       seq_run;
  logic [5:0] seq_idx, idx_d;
  logic       hp_en_d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      seq_run <= 1'b0;
      seq_idx <= '0;
      idx_d   <= '0;
      hp_en_d <= 1'b0;
    end else begin
      if (done) begin
        seq_run <= 1'b1;
        seq_idx <= '0;
      end else if (seq_run) begin
        if (seq_idx == 6'(NSUB-1)) seq_run <= 1'b0;
        seq_idx <= seq_idx + 6'd1;
      end
      idx_d   <= seq_idx;
      hp_en_d <= hp_en[seq_idx];
    end

  vtbs_trajectory #(.METHOD(METHOD)) u_vtbs (
    .clk, .rst_n, .in_valid(seq_run), .ip_mv(best_mv[seq_idx]),
    .out_valid(traj_valid), .mode(traj_mode), .loc_mask(traj_loc_mask)
  );

  assign traj_blk   = idx_d;
  assign traj_hp_en = hp_en_d;

  vdsr_sad_reuse u_vdsr_add (
    .clk, .rst_n, .wr4_en, .wr4_blk, .wr4_loc, .wr4_sad,
    .wr8_en, .wr8_blk, .wr8_loc, .wr8_sad,
    .req_valid, .req_blk, .req_loc, .sum_valid, .sum_blk, .sum_loc, .sum_sad
  );

  hp_fir6 u_fir (
    .clk, .rst_n, .in_valid(fir_in_valid), .tap(fir_tap),
    .out_valid(fir_out_valid), .half(fir_half)
  );

  me64_core u_ime64 (
    .clk, .rst_n, .sw_we(sw64_we), .sw_col(sw64_col), .sw_row(sw64_row), .sw_pix(sw64_pix),
    .cur_we(cur64_we), .cur_row(cur64_row), .cur_data(cur64_data), .start(start64),
    .busy(busy64), .done(done64), .best_sad(best64_sad), .best_mv(best64_mv)
  );

endmodule
