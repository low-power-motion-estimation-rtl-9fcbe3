// tb_vdsr_sad_reuse: fills the 4x4 and 8x8 half-pixel SAD files with random
// values, then requests the sum for every larger block and position. The
// expected sums come from the sub-block geometry: 4x8, 8x4 and 8x8 blocks
// add the 4x4 SADs they contain, larger blocks the 8x8 SADs. 8x8 requests
// are made first, so the later 8x16/16x8/16x16 sums also test that 8x8
// results are written back.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_vdsr_sad_reuse;
  import me_pkg::*;
  import me_ref_pkg::geometry;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  vdsr_sad_reuse dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int m4 [16][8], m8 [4][8];

  task automatic request(int k, int l);
    int x0, y0, w, h, e;
    geometry(k, x0, y0, w, h);
    e = 0;
    if (k < IDX_8X16) begin
      for (int y = y0; y < y0 + h; y += 4)
        for (int x = x0; x < x0 + w; x += 4) e += m4[(y/4)*4 + x/4][l];
    end else begin
      for (int y = y0; y < y0 + h; y += 8)
        for (int x = x0; x < x0 + w; x += 8) e += m8[(y/8)*2 + x/8][l];
    end
    if (k >= IDX_8X8 && k < IDX_8X16) m8[k - IDX_8X8][l] = e;
    @(negedge clk);
    req_valid = 1; req_blk = 6'(k); req_loc = 3'(l);
    @(negedge clk);
    req_valid = 0;
    check(sum_valid && int'(sum_blk) == k && int'(sum_loc) == l, "sum handshake");
    check(int'(sum_sad) == e, $sformatf("blk %0d loc %0d sum %0d exp %0d", k, l, sum_sad, e));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      for (int b = 0; b < 16; b++)
        for (int l = 0; l < 8; l++) begin
          @(negedge clk);
          wr4_en = 1; wr4_blk = 4'(b); wr4_loc = 3'(l);
          wr4_sad = sad_t'($urandom_range(0, 4080)); m4[b][l] = wr4_sad;
        end
      for (int b = 0; b < 4; b++)
        for (int l = 0; l < 8; l++) begin
          @(negedge clk);
          wr4_en = 0;
          wr8_en = 1; wr8_blk = 2'(b); wr8_loc = 3'(l);
          wr8_sad = sad_t'($urandom_range(0, 16320)); m8[b][l] = wr8_sad;
        end
      @(negedge clk);
      wr4_en = 0; wr8_en = 0;
      // odd rounds: 8x8 blocks by reuse, overwriting the written 8x8 SADs
      if (round % 2)
        for (int k = IDX_8X8; k < IDX_8X16; k++)
          for (int l = 0; l < 8; l++) request(k, l);
      for (int k = IDX_4X8; k < NSUB; k++)
        for (int l = 0; l < 8; l++)
          if (!(k >= IDX_8X8 && k < IDX_8X16) || round % 2) request(k, l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
