// tb_sad_acc64: groups of four phases of random ADs (with idle cycles in
// between) are accumulated; after phase 3 every 4x4 SAD must equal the sum
// of the 16 ADs of that block over the four phases, and out_valid must
// pulse once, one cycle after phase 3.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_sad_acc64;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, out_valid;
  logic [1:0] phase = 0;
  pixel_t     ad [4][MB_N];
  sad_t       sad [16];

  sad_acc64 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int e [16];
    for (int j = 0; j < 4; j++) for (int x = 0; x < MB_N; x++) ad[j][x] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int b = 0; b < 16; b++) e[b] = 0;
      for (int p = 0; p < 4; p++) begin
        if ($urandom_range(0, 3) == 0) begin
          // idle cycle inside the group: junk that must be ignored
          @(negedge clk);
          in_valid = 0; phase = 2'($urandom_range(0, 3));
          for (int j = 0; j < 4; j++) for (int x = 0; x < MB_N; x++) ad[j][x] = pixel_t'($urandom);
        end
        @(negedge clk);
        if (p > 0) check(!out_valid, "no early out_valid");
        in_valid = 1; phase = 2'(p);
        for (int j = 0; j < 4; j++) for (int x = 0; x < MB_N; x++) begin
          ad[j][x] = pixel_t'($urandom);
          e[j*4 + x/4] += ad[j][x];
        end
      end
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "out_valid after phase 3");
      for (int b = 0; b < 16; b++)
        check(int'(sad[b]) == e[b], $sformatf("blk %0d sad %0d exp %0d", b, sad[b], e[b]));
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
