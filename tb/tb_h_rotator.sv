// tb_h_rotator: for every rotation 0..16 and random pixels, checks
// dout[k] = din[(rot + k) mod 17].
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_h_rotator;
  import me_pkg::*;

  logic [4:0] rot = 0;
  pixel_t din [NBANK], dout [NBANK];

  h_rotator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 20; t++)
      for (int r = 0; r < NBANK; r++) begin
        rot = 5'(r);
        for (int b = 0; b < NBANK; b++) din[b] = pixel_t'($urandom);
        #1;
        for (int k = 0; k < NBANK; k++)
          check(dout[k] == din[(r + k) % NBANK], $sformatf("rot %0d out %0d", r, k));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
