// tb_sw_bank: fills the memory with random words, then reads random
// addresses (with and without read enable, and with simultaneous writes)
// and checks the one-cycle synchronous read.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_sw_bank;
  import me_pkg::*;

  localparam int DEPTH = 3 * SW_N;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic we = 0, re = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  pixel_t wdata = 0, rdata;

  sw_bank dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int m [DEPTH];

  initial begin
    int exp_q;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = pixel_t'($urandom); m[a] = wdata;
    end
    @(negedge clk);
    we = 0; re = 1; raddr = 0;
    exp_q = m[0];
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(int'(rdata) == exp_q, $sformatf("read %0d exp %0d", rdata, exp_q));
      re = ($urandom_range(0, 3) != 0);
      raddr = AW'($urandom_range(0, DEPTH-1));
      we = ($urandom_range(0, 3) == 0);
      waddr = AW'($urandom_range(0, DEPTH-1));
      wdata = pixel_t'($urandom);
      if (re) exp_q = m[raddr];   // read-before-write on a collision
      if (we) m[waddr] = wdata;
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
