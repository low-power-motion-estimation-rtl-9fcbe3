// tb_vbs_sad_tree: random 4x4 SADs; each of the 41 outputs is checked two
// cycles later against the sum of the 4x4 SADs inside that sub-block,
// computed from the sub-block geometry.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_vbs_sad_tree;
  import me_pkg::*;
  import me_ref_pkg::geometry;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  sad_t sad16 [16], sad41 [NSUB];

  vbs_sad_tree dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int exp_s [3][NSUB];
  bit exp_v [3];

  initial begin
    for (int i = 0; i < 3; i++) exp_v[i] = 0;
    for (int b = 0; b < 16; b++) sad16[b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      check(out_valid == exp_v[1], "out_valid latency");
      if (exp_v[1])
        for (int k = 0; k < NSUB; k++)
          check(int'(sad41[k]) == exp_s[1][k], $sformatf("blk %0d sad %0d exp %0d", k, sad41[k], exp_s[1][k]));
      in_valid = ($urandom_range(0, 4) != 0);
      for (int b = 0; b < 16; b++) sad16[b] = sad_t'($urandom_range(0, 4080));
      exp_s[2] = exp_s[1]; exp_v[2] = exp_v[1];
      exp_s[1] = exp_s[0]; exp_v[1] = exp_v[0];
      exp_v[0] = in_valid;
      for (int k = 0; k < NSUB; k++) begin
        int x0, y0, w, h;
        geometry(k, x0, y0, w, h);
        exp_s[0][k] = 0;
        for (int by = y0 / 4; by < (y0 + h) / 4; by++)
          for (int bx = x0 / 4; bx < (x0 + w) / 4; bx++)
            exp_s[0][k] += sad16[by*4 + bx];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
