// tb_sad4x4_tree: random AD arrays, one per cycle with gaps, checked two
// cycles later against directly summed 4x4 SADs; out_valid latency too.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_sad4x4_tree;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   in_valid = 0, out_valid;
  pixel_t ad [MB_N][MB_N];
  sad_t   sad [16];

  sad4x4_tree dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int exp_s [3][16];
  bit exp_v [3];

  initial begin
    for (int i = 0; i < 3; i++) exp_v[i] = 0;
    for (int y = 0; y < MB_N; y++) for (int x = 0; x < MB_N; x++) ad[y][x] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      check(out_valid == exp_v[1], "out_valid latency");
      if (exp_v[1])
        for (int b = 0; b < 16; b++)
          check(int'(sad[b]) == exp_s[1][b], $sformatf("blk %0d sad %0d exp %0d", b, sad[b], exp_s[1][b]));
      in_valid = ($urandom_range(0, 4) != 0);
      for (int y = 0; y < MB_N; y++) for (int x = 0; x < MB_N; x++) ad[y][x] = pixel_t'($urandom);
      exp_s[2] = exp_s[1]; exp_v[2] = exp_v[1];
      exp_s[1] = exp_s[0]; exp_v[1] = exp_v[0];
      exp_v[0] = in_valid;
      for (int b = 0; b < 16; b++) begin
        exp_s[0][b] = 0;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          exp_s[0][b] += ad[(b/4)*4 + y][(b%4)*4 + x];
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
