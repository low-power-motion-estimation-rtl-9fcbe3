// tb_me_top: end-to-end test of the motion estimation subsystem at its
// default configuration (E-ADP comparison prediction in all PEs, bigger-than
// trajectory criterion).
//
// Three macroblocks are searched, each a noisy copy of the search window at
// a planted displacement: (+5,-7), (-9,0) and (+3,+3), so that the
// trajectory estimation has to choose 1-D y, 1-D x and 2-D search for the
// 16x16 block. For each search it checks
//   * the 41 best SADs and MVs against the reference model, which replays
//     every PE's prediction flip-flop (state carries over between searches),
//   * the misprediction count and the search time (1039 + 8 cycles),
//   * the VDSR flags against the "all contained blocks share one MV" rule,
//   * the 41-entry trajectory stream against the bigger-than rule.
// It then drives the SAD-reuse adder and the interpolation filter through
// the top-level ports. The mechanisms of the design (up, down and left
// shifts of the array, prediction misses, SAD reuse, 1-D x, 1-D y and 2-D
// half-pixel search, write-back of reused 8x8 SADs, filter clipping) are
// counted, and one that never happened is a failure. Finally the 64-PE
// engine searches a fourth block (displacement (-6,+11)) and is checked
// against the exact-AD reference in its top-to-bottom column order, with
// its 32 x 140 + 7 cycle search time.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_me_top;
  import me_pkg::*;
  import me_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       sw_we = 0, cur_we = 0, start = 0;
  logic [5:0] sw_col = 0, sw_row = 0;
  pixel_t     sw_pix = 0;
  logic [3:0] cur_row = 0;
  pixel_t     cur_data [MB_N];
  logic       busy, done;
  sad_t       best_sad [NSUB];
  mv_t        best_mv  [NSUB];
  logic [31:0] mispred_cnt;
  logic [NSUB-1:0] hp_en;
  logic       traj_valid, traj_hp_en;
  logic [5:0] traj_blk;
  hp_mode_e   traj_mode;
  logic [7:0] traj_loc_mask;
  logic       wr4_en = 0, wr8_en = 0, req_valid = 0;
  logic [3:0] wr4_blk = 0;
  logic [1:0] wr8_blk = 0;
  logic [2:0] wr4_loc = 0, wr8_loc = 0, req_loc = 0;
  sad_t       wr4_sad = 0, wr8_sad = 0;
  logic [5:0] req_blk = 0;
  logic       sum_valid;
  logic [5:0] sum_blk;
  logic [2:0] sum_loc;
  sad_t       sum_sad;
  logic       fir_in_valid = 0, fir_out_valid;
  pixel_t     fir_tap [6];
  pixel_t     fir_half;
  logic       sw64_we = 0, cur64_we = 0, start64 = 0;
  logic [5:0] sw64_col = 0, sw64_row = 0;
  pixel_t     sw64_pix = 0;
  logic [3:0] cur64_row = 0;
  pixel_t     cur64_data [MB_N];
  logic       busy64, done64;
  sad_t       best64_sad [NSUB];
  mv_t        best64_mv  [NSUB];

  me_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_up = 0, n_down = 0, n_left = 0, n_mis = 0, n_reuse = 0;
  int n_1dx = 0, n_1dy = 0, n_2d = 0, n_wb = 0, n_clip = 0;

  always @(posedge clk) begin
    if (rst_n) case (dut.u_ime.shift)
      SH_UP:   n_up++;
      SH_DOWN: n_down++;
      SH_LEFT: n_left++;
      default: ;
    endcase
  end

  // trajectory stream capture
  hp_mode_e tr_mode [NSUB];
  bit       tr_seen [NSUB];
  bit       tr_hp   [NSUB];
  logic [7:0] tr_mask [NSUB];
  int       tr_count;
  always @(posedge clk)
    if (traj_valid) begin
      tr_mode[traj_blk] <= traj_mode;
      tr_mask[traj_blk] <= traj_loc_mask;
      tr_hp[traj_blk]   <= traj_hp_en;
      tr_seen[traj_blk] <= 1;
      tr_count <= tr_count + 1;
    end

  task automatic search(int dx, int dy, int seed);
    int cycles;
    for (int r = 0; r < SW_N; r++)
      for (int c = 0; c < SW_N; c++) sw[r][c] = picture(c, r, seed);
    for (int r = 0; r < MB_N; r++)
      for (int c = 0; c < MB_N; c++)
        cur[r][c] = sw[r + dy + RANGE][c + dx + RANGE] ^ $urandom_range(0, 3);
    run_search(AD_EADP, 0);
    for (int r = 0; r < SW_N; r++)
      for (int c = 0; c < SW_N; c++) begin
        @(negedge clk);
        sw_we = 1; sw_col = 6'(c); sw_row = 6'(r); sw_pix = pixel_t'(sw[r][c]);
      end
    for (int r = 0; r < MB_N; r++) begin
      @(negedge clk);
      sw_we = 0;
      cur_we = 1; cur_row = 4'(r);
      for (int c = 0; c < MB_N; c++) cur_data[c] = pixel_t'(cur[r][c]);
    end
    @(negedge clk);
    cur_we = 0;
    for (int k = 0; k < NSUB; k++) tr_seen[k] = 0;
    tr_count = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 1039 + 8, $sformatf("search took %0d cycles", cycles));
    for (int k = 0; k < NSUB; k++) begin
      check(int'(best_sad[k]) == int'(ref_sad[k]),
            $sformatf("blk %0d sad %0d ref %0d", k, best_sad[k], ref_sad[k]));
      check(int'(best_mv[k].x) == ref_mvx[k] && int'(best_mv[k].y) == ref_mvy[k],
            $sformatf("blk %0d mv (%0d,%0d) ref (%0d,%0d)", k, best_mv[k].x, best_mv[k].y,
                      ref_mvx[k], ref_mvy[k]));
    end
    check(ref_mvx[IDX_16X16] == dx && ref_mvy[IDX_16X16] == dy, "planted motion found");
    check(longint'(mispred_cnt) == ref_mispred,
          $sformatf("mispredictions %0d ref %0d", mispred_cnt, ref_mispred));
    n_mis += mispred_cnt;
    $display("search (%0d,%0d): prediction accuracy %0d.%0d%%", dx, dy,
             (262144 - mispred_cnt) * 100 / 262144, ((262144 - mispred_cnt) * 1000 / 262144) % 10);

    // VDSR: a larger block reuses when all its parts share the MV
    for (int k = 0; k < NSUB; k++) begin
      int x0, y0, w, h;
      bit all_eq;
      geometry(k, x0, y0, w, h);
      all_eq = 0;
      if (k >= IDX_4X8) begin
        int g, g0;
        g = (k < IDX_8X16) ? 4 : 8;
        all_eq = 1;
        for (int y = y0; y < y0 + h; y += g)
          for (int x = x0; x < x0 + w; x += g) begin
            int a, a0;
            a  = (g == 4) ? (y/4)*4 + x/4 : IDX_8X8 + (y/8)*2 + x/8;
            a0 = (g == 4) ? (y0/4)*4 + x0/4 : IDX_8X8 + (y0/8)*2 + x0/8;
            if (ref_mvx[a] != ref_mvx[a0] || ref_mvy[a] != ref_mvy[a0]) all_eq = 0;
          end
      end
      check(hp_en[k] == !all_eq, $sformatf("hp_en blk %0d", k));
      if (all_eq) n_reuse++;
    end

    // trajectory stream
    repeat (45) @(negedge clk);
    check(tr_count == NSUB, $sformatf("trajectory stream has %0d entries", tr_count));
    for (int k = 0; k < NSUB; k++) begin
      int ax, ay;
      hp_mode_e e;
      ax = ref_mvx[k] < 0 ? -ref_mvx[k] : ref_mvx[k];
      ay = ref_mvy[k] < 0 ? -ref_mvy[k] : ref_mvy[k];
      e = (ax > ay) ? HP_1D_X : (ay > ax) ? HP_1D_Y : HP_2D;
      check(tr_seen[k] && tr_mode[k] == e && tr_hp[k] == hp_en[k],
            $sformatf("trajectory blk %0d mode %0d exp %0d", k, tr_mode[k], e));
      check(tr_mask[k] == ((e == HP_2D) ? 8'hFF : (e == HP_1D_X) ? 8'h18 : 8'h42), "mask");
      case (e)
        HP_1D_X: n_1dx++;
        HP_1D_Y: n_1dy++;
        default: n_2d++;
      endcase
    end
  endtask

  // 64-PE engine: exact ADs, columns searched top to bottom
  int n_fill64 = 0, n_shift64 = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_ime64.fill_d1)  n_fill64++;
    if (rst_n && dut.u_ime64.shift_d1) n_shift64++;
  end

  task automatic search64(int dx, int dy, int seed);
    int cycles;
    for (int r = 0; r < SW_N; r++)
      for (int c = 0; c < SW_N; c++) sw[r][c] = picture(c, r, seed);
    for (int r = 0; r < MB_N; r++)
      for (int c = 0; c < MB_N; c++)
        cur[r][c] = sw[r + dy + RANGE][c + dx + RANGE] ^ $urandom_range(0, 3);
    run_search(AD_STD, 0, 0);
    for (int r = 0; r < SW_N; r++)
      for (int c = 0; c < SW_N; c++) begin
        @(negedge clk);
        sw64_we = 1; sw64_col = 6'(c); sw64_row = 6'(r); sw64_pix = pixel_t'(sw[r][c]);
      end
    for (int r = 0; r < MB_N; r++) begin
      @(negedge clk);
      sw64_we = 0;
      cur64_we = 1; cur64_row = 4'(r);
      for (int c = 0; c < MB_N; c++) cur64_data[c] = pixel_t'(cur[r][c]);
    end
    @(negedge clk);
    cur64_we = 0;
    start64 = 1;
    @(negedge clk);
    start64 = 0;
    cycles = 1;
    while (!done64 && cycles < 10000) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 32 * 140 + 7, $sformatf("64-PE search took %0d cycles", cycles));
    for (int k = 0; k < NSUB; k++) begin
      check(int'(best64_sad[k]) == int'(ref_sad[k]),
            $sformatf("64-PE blk %0d sad %0d ref %0d", k, best64_sad[k], ref_sad[k]));
      check(int'(best64_mv[k].x) == ref_mvx[k] && int'(best64_mv[k].y) == ref_mvy[k],
            $sformatf("64-PE blk %0d mv", k));
    end
    check(ref_mvx[IDX_16X16] == dx && ref_mvy[IDX_16X16] == dy, "64-PE planted motion found");
  endtask

  task automatic reuse_and_filter();
    int m4 [16];
    int e;
    // 4x4 half-pixel SADs for position 5, then 8x8 quadrant 1 by reuse,
    // then the 16x8 block 0 (8x8 blocks 0 and 1) using the written-back sum
    for (int b = 0; b < 16; b++) begin
      @(negedge clk);
      wr4_en = 1; wr4_blk = 4'(b); wr4_loc = 3'd5; m4[b] = $urandom_range(0, 4000);
      wr4_sad = sad_t'(m4[b]);
    end
    @(negedge clk);
    wr4_en = 0;
    wr8_en = 1; wr8_blk = 2'd0; wr8_loc = 3'd5; wr8_sad = 16'd1000;
    @(negedge clk);
    wr8_en = 0;
    req_valid = 1; req_blk = 6'(IDX_8X8 + 1); req_loc = 3'd5;
    @(negedge clk);
    req_valid = 0;
    e = m4[2] + m4[3] + m4[6] + m4[7];
    check(sum_valid && int'(sum_sad) == e, "8x8 sum by reuse");
    req_valid = 1; req_blk = 6'(IDX_16X8); req_loc = 3'd5;
    @(negedge clk);
    req_valid = 0;
    check(sum_valid && int'(sum_sad) == 1000 + e, "16x8 sum from written-back 8x8");
    if (sum_valid && int'(sum_sad) == 1000 + e) n_wb++;
    // interpolation filter: ramp and an overshooting edge
    fir_tap = '{8'd10, 8'd20, 8'd30, 8'd40, 8'd50, 8'd60};
    fir_in_valid = 1;
    @(negedge clk);
    fir_in_valid = 0;
    check(fir_out_valid && fir_half == 8'd35, $sformatf("filter ramp %0d", fir_half));
    fir_tap = '{8'd255, 8'd0, 8'd255, 8'd255, 8'd0, 8'd255};
    fir_in_valid = 1;
    @(negedge clk);
    fir_in_valid = 0;
    check(fir_out_valid && fir_half == 8'd255, "filter clips");
    if (fir_half == 8'd255) n_clip++;
  endtask

  initial begin
    for (int c = 0; c < MB_N; c++) begin cur_data[c] = 0; cur64_data[c] = 0; end
    for (int i = 0; i < 6; i++) fir_tap[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    reset_pe_state();
    search(5, -7, 1);
    search(-9, 0, 2);
    search(3, 3, 4);
    reuse_and_filter();
    search64(-6, 11, 5);
    $display("mechanisms: up %0d down %0d left %0d mispredictions %0d reuse %0d 1-D x %0d 1-D y %0d 2-D %0d write-back %0d clip %0d fill64 %0d shift64 %0d",
             n_up, n_down, n_left, n_mis, n_reuse, n_1dx, n_1dy, n_2d, n_wb, n_clip, n_fill64, n_shift64);
    check(n_up > 0,   "array up shift happened");
    check(n_down > 0, "array down shift happened");
    check(n_left == 3 * 31, "left shifts");
    check(n_mis > 0,  "prediction miss happened");
    check(n_reuse > 0, "SAD reuse happened");
    check(n_1dx > 0 && n_1dy > 0 && n_2d > 0, "all half-pixel search modes happened");
    check(n_wb > 0 && n_clip > 0, "write-back and clipping happened");
    check(n_fill64 == 32 * 16 && n_shift64 == 32 * 31, "64-PE fills and chain shifts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
