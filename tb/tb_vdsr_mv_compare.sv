// tb_vdsr_mv_compare: random integer MV sets in which neighbouring blocks
// often share an MV. A larger block must be marked for reuse exactly when
// all 4x4 blocks inside it (for 4x8, 8x4, 8x8) or all 8x8 blocks inside it
// (for 8x16, 16x8, 16x16) have equal MVs; 4x4 blocks always search.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_vdsr_mv_compare;
  import me_pkg::*;
  import me_ref_pkg::geometry;

  mv_t ip_mv [NSUB];
  logic [NSUB-1:0] hp_en, reuse;

  vdsr_mv_compare dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int n_reuse [NSUB];

  initial begin
    for (int k = 0; k < NSUB; k++) n_reuse[k] = 0;
    for (int t = 0; t < 3000; t++) begin
      mv_t base;
      base.x = MV_W'($urandom_range(0, 31) - 16);
      base.y = MV_W'($urandom_range(0, 31) - 16);
      for (int k = 0; k < NSUB; k++) begin
        ip_mv[k] = base;
        if ($urandom_range(0, 99) < ((t % 4) * 8)) ip_mv[k].x = MV_W'($urandom_range(0, 31) - 16);
      end
      #1;
      for (int k = 0; k < NSUB; k++) begin
        int x0, y0, w, h, unit, base_k;
        bit all_eq;
        geometry(k, x0, y0, w, h);
        all_eq = 0;
        if (k >= IDX_4X8 && k < IDX_8X16) begin
          all_eq = 1;
          for (int y = y0; y < y0 + h; y += 4)
            for (int x = x0; x < x0 + w; x += 4)
              if (ip_mv[(y/4)*4 + x/4] != ip_mv[(y0/4)*4 + x0/4]) all_eq = 0;
        end else if (k >= IDX_8X16) begin
          all_eq = 1;
          for (int y = y0; y < y0 + h; y += 8)
            for (int x = x0; x < x0 + w; x += 8)
              if (ip_mv[IDX_8X8 + (y/8)*2 + x/8] != ip_mv[IDX_8X8 + (y0/8)*2 + x0/8]) all_eq = 0;
        end
        check(reuse[k] == all_eq && hp_en[k] == !all_eq, $sformatf("t=%0d blk %0d", t, k));
        if (all_eq) n_reuse[k]++;
      end
    end
    for (int k = IDX_4X8; k < NSUB; k++) check(n_reuse[k] > 0, $sformatf("blk %0d never reused", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
