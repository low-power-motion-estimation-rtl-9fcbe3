// tb_ad_unit: checks the three absolute-difference circuits against a
// model. A stream of correlated (slowly varying) and random pixel pairs is
// applied to one instance of each mode with occasional idle cycles; the
// exact circuit must give |s - c|, the prediction circuits must follow the
// prediction flip-flop rule (reset or hold on a wrong prediction).
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_ad_unit;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   en = 0;
  pixel_t cur = 0, srch = 0;
  pixel_t ad_s, ad_r, ad_e;
  logic   mp_s, mp_r, mp_e;

  ad_unit #(.MODE(AD_STD))  u_s (.clk, .rst_n, .en, .cur, .srch, .ad(ad_s), .mispred(mp_s));
  ad_unit #(.MODE(AD_RADP)) u_r (.clk, .rst_n, .en, .cur, .srch, .ad(ad_r), .mispred(mp_r));
  ad_unit #(.MODE(AD_EADP)) u_e (.clk, .rst_n, .en, .cur, .srch, .ad(ad_e), .mispred(mp_e));

  int checks = 0, failures = 0;
  int n_mis = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit pr, pe;
    int er_ad, ee_ad, es_ad;
    bit er_mp, ee_mp;
    pr = 0; pe = 0; er_ad = 0; ee_ad = 0; es_ad = 0; er_mp = 0; ee_mp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int s, c, d;
      @(negedge clk);
      // compare outputs produced by the previous edge
      check(int'(ad_s) == es_ad && !mp_s, $sformatf("std ad %0d exp %0d", ad_s, es_ad));
      check(int'(ad_r) == er_ad && mp_r == er_mp, $sformatf("radp ad %0d exp %0d", ad_r, er_ad));
      check(int'(ad_e) == ee_ad && mp_e == ee_mp, $sformatf("eadp ad %0d exp %0d", ad_e, ee_ad));
      en = ($urandom_range(0, 9) != 0);
      if (i < 2000) begin
        s = 100 + (i % 37) + $urandom_range(0, 10);
        c = 120 + $urandom_range(0, 20);
      end else begin
        s = $urandom_range(0, 255);
        c = $urandom_range(0, 255);
      end
      srch = pixel_t'(s);
      cur  = pixel_t'(c);
      if (en) begin
        es_ad = (s > c) ? s - c : c - s;
        d = pr ? c - s : s - c;
        er_mp = (d < 0);
        if (d < 0) begin er_ad = 0; pr = !pr; n_mis++; end else er_ad = d;
        d = pe ? c - s : s - c;
        ee_mp = (d < 0);
        if (d < 0) pe = !pe; else ee_ad = d;
      end
    end
    check(n_mis > 10, "prediction misses were exercised");
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
