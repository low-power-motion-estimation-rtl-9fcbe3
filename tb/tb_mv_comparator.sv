// tb_mv_comparator: streams of random SADs (narrow range, so ties occur)
// with their MVs; after each stream the 41 kept minima and MVs must equal
// the first minimum of each sub-block. clear starts each stream.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_mv_comparator;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, in_valid = 0;
  mv_t  in_mv = '0;
  sad_t sad41 [NSUB], best_sad [NSUB];
  mv_t  best_mv [NSUB];

  mv_comparator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int es [NSUB];
    mv_t em [NSUB];
    for (int k = 0; k < NSUB; k++) sad41[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int k = 0; k < NSUB; k++) es[k] = -1;
      for (int i = 0; i < 100; i++) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_mv.x = MV_W'($urandom_range(0, 31) - 16);
        in_mv.y = MV_W'($urandom_range(0, 31) - 16);
        for (int k = 0; k < NSUB; k++) sad41[k] = sad_t'($urandom_range(100, 160));
        if (in_valid)
          for (int k = 0; k < NSUB; k++)
            if (es[k] < 0 || int'(sad41[k]) < es[k]) begin
              es[k] = sad41[k];
              em[k] = in_mv;
            end
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      for (int k = 0; k < NSUB; k++) begin
        check(int'(best_sad[k]) == es[k], $sformatf("blk %0d sad %0d exp %0d", k, best_sad[k], es[k]));
        check(best_mv[k] == em[k], $sformatf("blk %0d mv", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
