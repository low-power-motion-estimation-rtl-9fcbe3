// tb_temp_regs: random shift commands and inputs against a model of the
// 16-register column (up: enter at 15, down: enter at 0, else hold).
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_temp_regs;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  shift_e shift = SH_HOLD;
  pixel_t din = 0;
  pixel_t q [MB_N];

  temp_regs dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int m [MB_N];

  initial begin
    for (int i = 0; i < MB_N; i++) m[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int n [MB_N];
      @(negedge clk);
      for (int k = 0; k < MB_N; k++)
        check(int'(q[k]) == m[k], $sformatf("reg %0d = %0d exp %0d", k, q[k], m[k]));
      shift = shift_e'($urandom_range(0, 3));
      din = pixel_t'($urandom);
      n = m;
      if (shift == SH_UP) begin
        for (int k = 0; k < MB_N-1; k++) n[k] = m[k+1];
        n[MB_N-1] = din;
      end else if (shift == SH_DOWN) begin
        for (int k = 1; k < MB_N; k++) n[k] = m[k-1];
        n[0] = din;
      end
      m = n;
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
