// tb_me64_core: self-checking test of the 256-PE full-search ME core with
// the exact absolute-difference circuit.
//
// Two macroblocks are searched. The search window is a smooth textured
// picture; the current block is a copy of the window at a known offset with
// a little noise (first search) or random pixels (second search). For every
// one of the 41 sub-blocks the best SAD and MV are compared with the
// reference model, and the number of cycles from start to done is checked
// against 32 window columns of 140 cycles plus the 7-cycle tail.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_me64_core;
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
  
  me64_core dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic load_and_search(int unsigned expected_cycles);
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
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == int'(expected_cycles),
          $sformatf("search took %0d cycles, expected %0d", cycles, expected_cycles));
    for (int k = 0; k < NSUB; k++) begin
      check(int'(best_sad[k]) == int'(ref_sad[k]),
            $sformatf("blk %0d sad %0d ref %0d", k, best_sad[k], ref_sad[k]));
      check(int'(best_mv[k].x) == ref_mvx[k] && int'(best_mv[k].y) == ref_mvy[k],
            $sformatf("blk %0d mv (%0d,%0d) ref (%0d,%0d)", k, best_mv[k].x,
                      best_mv[k].y, ref_mvx[k], ref_mvy[k]));
    end
  endtask

  initial begin
    for (int c = 0; c < MB_N; c++) cur_data[c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    reset_pe_state();

    // search 1: block displaced by (+5, -7)
    for (int r = 0; r < SW_N; r++)
      for (int c = 0; c < SW_N; c++) sw[r][c] = picture(c, r, 3);
    for (int r = 0; r < MB_N; r++)
      for (int c = 0; c < MB_N; c++) cur[r][c] = sw[r + 9][c + 21] ^ $urandom_range(0, 1);
    run_search(AD_STD, 0, 0);
    check(ref_mvx[IDX_16X16] == 5 && ref_mvy[IDX_16X16] == -7, "reference finds planted MV");
    load_and_search(32 * 140 + 7);

    // search 2: random window and block
    for (int r = 0; r < SW_N; r++)
      for (int c = 0; c < SW_N; c++) sw[r][c] = $urandom_range(0, 255);
    for (int r = 0; r < MB_N; r++)
      for (int c = 0; c < MB_N; c++) cur[r][c] = $urandom_range(0, 255);
    run_search(AD_STD, 0, 0);
    load_and_search(32 * 140 + 7);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
