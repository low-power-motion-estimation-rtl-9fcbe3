// tb_pe256: checks that a PE takes its search pixel from the right
// neighbour for each shift direction, holds it otherwise, stores its
// current pixel on cur_we, and outputs the registered |search - current|
// one cycle after ad_en.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_pe256;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  shift_e shift = SH_HOLD;
  pixel_t from_below = 0, from_above = 0, from_right = 0, cur_in = 0;
  logic   cur_we = 0, ad_en = 0;
  pixel_t srch, ad;
  logic   mispred;

  pe256 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int exp_s, exp_c, exp_ad;
    exp_s = 0; exp_c = 0; exp_ad = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(int'(srch) == exp_s, $sformatf("srch %0d exp %0d", srch, exp_s));
      check(int'(ad) == exp_ad, $sformatf("ad %0d exp %0d", ad, exp_ad));
      shift = shift_e'($urandom_range(0, 3));
      from_below = pixel_t'($urandom); from_above = pixel_t'($urandom);
      from_right = pixel_t'($urandom); cur_in = pixel_t'($urandom);
      cur_we = ($urandom_range(0, 7) == 0);
      ad_en  = ($urandom_range(0, 3) != 0);
      // the AD captured at the next edge uses the registers before it
      if (ad_en) exp_ad = (exp_s > exp_c) ? exp_s - exp_c : exp_c - exp_s;
      case (shift)
        SH_UP:   exp_s = from_below;
        SH_DOWN: exp_s = from_above;
        SH_LEFT: exp_s = from_right;
        default: ;
      endcase
      if (cur_we) exp_c = cur_in;
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
