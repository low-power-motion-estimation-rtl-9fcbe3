// tb_cp_workload: comparison-prediction workload for the 256-PE core.
//
// Five copies of me256_core run side by side on the same input. They use
// the exact AD circuit, R-ADP, E-ADP, CR-ADP and CE-ADP (the last two with
// the checkerboard of standard and predicting PEs). Several synthetic
// "sequences" are searched: each is a textured picture with its own seed,
// searched for two macroblocks with planted random motion and a little
// noise.
//
// For every search and every copy the testbench checks:
//   * the 41 best SADs and MVs against the reference model (which replays
//     the prediction state of each PE, carried across searches);
//   * the misprediction count;
//   * the 1047-cycle search time.
// At the end it prints, per method:
//   * the comparison-prediction accuracy;
//   * how often the chosen 16x16 MV equals the exact one.
// The accuracy must lie above 80 %.
//
// The evaluation (five sequences, four prediction methods against the exact
// circuit, prediction accuracy) follows the original study; the pictures
// are synthetic and far fewer blocks are searched, which is this
// testbench's own choice.
module tb_cp_workload;
  import me_pkg::*;
  import me_ref_pkg::*;

  localparam int NM = 5;
  localparam int NSEQ = 5;
  localparam int NMB_PER_SEQ = 2;
  localparam ad_mode_e MODES [NM] = '{AD_STD, AD_RADP, AD_EADP, AD_RADP, AD_EADP};
  localparam bit       CHK   [NM] = '{1'b0, 1'b0, 1'b0, 1'b1, 1'b1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       sw_we = 0, cur_we = 0, start = 0;
  logic [5:0] sw_col = 0, sw_row = 0;
  pixel_t     sw_pix = 0;
  logic [3:0] cur_row = 0;
  pixel_t     cur_data [MB_N];
  logic       busy [NM], done [NM];
  sad_t       best_sad [NM][NSUB];
  mv_t        best_mv  [NM][NSUB];
  logic [31:0] mispred_cnt [NM];

  for (genvar i = 0; i < NM; i++) begin : g_core
    me256_core #(.MODE(MODES[i]), .CHECKER(CHK[i])) dut (
      .clk, .rst_n, .sw_we, .sw_col, .sw_row, .sw_pix,
      .cur_we, .cur_row, .cur_data, .start,
      .busy(busy[i]), .done(done[i]), .best_sad(best_sad[i]),
      .best_mv(best_mv[i]), .mispred_cnt(mispred_cnt[i])
    );
  end

  int checks = 0, failures = 0;

  // reference state per method
  bit          st_pred [NM][MB_N][MB_N];
  int unsigned st_ad   [NM][MB_N][MB_N];
  int unsigned e_sad   [NM][NSUB];
  int          e_mvx   [NM][NSUB];
  int          e_mvy   [NM][NSUB];
  longint unsigned e_mis [NM];
  // statistics
  longint unsigned tot_mis [NM];
  longint unsigned tot_cmp [NM];
  int              mv_same [NM];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic reference_all();
    for (int m = 0; m < NM; m++) begin
      pred   = st_pred[m];
      ad_reg = st_ad[m];
      run_search(MODES[m], CHK[m]);
      st_pred[m] = pred;
      st_ad[m]   = ad_reg;
      e_sad[m] = ref_sad;
      e_mvx[m] = ref_mvx;
      e_mvy[m] = ref_mvy;
      e_mis[m] = ref_mispred;
    end
  endtask

  task automatic load_and_search();
    int cycles;
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
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done[0]) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 1039 + 8, $sformatf("search took %0d cycles", cycles));
    for (int m = 0; m < NM; m++) begin
      check(done[m], $sformatf("method %0d not done with the others", m));
      for (int k = 0; k < NSUB; k++) begin
        check(int'(best_sad[m][k]) == int'(e_sad[m][k]),
              $sformatf("method %0d blk %0d sad %0d ref %0d", m, k, best_sad[m][k], e_sad[m][k]));
        check(int'(best_mv[m][k].x) == e_mvx[m][k] && int'(best_mv[m][k].y) == e_mvy[m][k],
              $sformatf("method %0d blk %0d mv (%0d,%0d) ref (%0d,%0d)", m, k,
                        best_mv[m][k].x, best_mv[m][k].y, e_mvx[m][k], e_mvy[m][k]));
      end
      check(longint'(mispred_cnt[m]) == longint'(e_mis[m]),
            $sformatf("method %0d mispredictions %0d ref %0d", m, mispred_cnt[m], e_mis[m]));
      tot_mis[m] += e_mis[m];
      tot_cmp[m] += (CHK[m] ? 128 : 256) * NLOC * NLOC;
      if (e_mvx[m][IDX_16X16] == e_mvx[0][IDX_16X16] && e_mvy[m][IDX_16X16] == e_mvy[0][IDX_16X16])
        mv_same[m]++;
    end
  endtask

  initial begin
    for (int c = 0; c < MB_N; c++) cur_data[c] = 0;
    for (int m = 0; m < NM; m++) begin
      tot_mis[m] = 0; tot_cmp[m] = 0; mv_same[m] = 0;
      for (int y = 0; y < MB_N; y++)
        for (int x = 0; x < MB_N; x++) begin
          st_pred[m][y][x] = 0; st_ad[m][y][x] = 0;
        end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int s = 0; s < NSEQ; s++)
      for (int b = 0; b < NMB_PER_SEQ; b++) begin
        int dx, dy;
        dx = $urandom_range(0, 31);
        dy = $urandom_range(0, 31);
        for (int r = 0; r < SW_N; r++)
          for (int c = 0; c < SW_N; c++) sw[r][c] = picture(c + 13 * b, r + 7 * b, 11 * s + 1);
        for (int r = 0; r < MB_N; r++)
          for (int c = 0; c < MB_N; c++) cur[r][c] = sw[r + dy][c + dx] ^ $urandom_range(0, 1);
        reference_all();
        load_and_search();
      end

    for (int m = 0; m < NM; m++) begin
      real acc;
      acc = (m == 0) ? 100.0
          : 100.0 * (1.0 - real'(tot_mis[m]) / real'(tot_cmp[m]));
      $display("method %0d (%0s%0s): prediction accuracy %0.2f %%, 16x16 MV equal to exact in %0d of %0d blocks",
               m, CHK[m] ? "checkerboard " : "", MODES[m].name(), acc, mv_same[m], NSEQ * NMB_PER_SEQ);
      if (m != 0) check(acc > 80.0, $sformatf("method %0d accuracy %0.2f below 80", m, acc));
      else        check(tot_mis[m] == 0, "exact circuit mispredicted");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
