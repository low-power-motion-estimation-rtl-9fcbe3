// tb_hp_fir6: flat, edge and random six-pixel inputs; the output must be
// the rounded and clipped (A - 5B + 20C + 20D - 5E + F) / 32, one cycle
// after in_valid. Clipping at both ends is exercised.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_hp_fir6;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   in_valid = 0, out_valid;
  pixel_t tap [6];
  pixel_t half;

  hp_fir6 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_lo, n_hi;
    n_lo = 0; n_hi = 0;
    for (int i = 0; i < 6; i++) tap[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int v [6];
      int e;
      for (int i = 0; i < 6; i++) begin
        case (t % 3)
          0: v[i] = $urandom_range(0, 255);
          1: v[i] = (i == 1 || i == 4) ? 255 : $urandom_range(0, 40);   // undershoot
          default: v[i] = (i == 1 || i == 4) ? 0 : $urandom_range(200, 255);  // overshoot
        endcase
        tap[i] = pixel_t'(v[i]);
      end
      e = v[0] - 5*v[1] + 20*v[2] + 20*v[3] - 5*v[4] + v[5];
      e = (e + 16);
      e = (e < 0) ? -((-e + 31) / 32) : e / 32;   // floor division
      if (e < 0) begin e = 0; n_lo++; end
      if (e > 255) begin e = 255; n_hi++; end
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid && int'(half) == e, $sformatf("taps %0d %0d %0d %0d %0d %0d: %0d exp %0d",
            v[0], v[1], v[2], v[3], v[4], v[5], half, e));
    end
    check(n_lo > 0 && n_hi > 0, "clipping exercised");
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
