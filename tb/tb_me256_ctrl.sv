// tb_me256_ctrl: runs one search of the control unit and checks, cycle by
// cycle, the zigzag schedule derived from the dataflow: column 0 reads rows
// 0..46 with up shifts and reports locations from the 16th cycle on; every
// later column starts with a left shift and then reads 31 rows, downward
// (rows 30..0, down shifts) in odd columns and upward (rows 16..46, up
// shifts) in even ones. Also checked: 1024 locations in zigzag order, 31
// left shifts, 1039 busy cycles and loc_last on the final location.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_me256_ctrl;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, busy, rd_en, loc_valid, loc_last;
  logic [5:0] rd_row;
  logic [4:0] rd_col;
  shift_e     shift;
  mv_t        loc_mv;

  me256_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int t, nloc, nleft;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !loc_valid && !rd_en, "idle after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    t = 0; nloc = 0; nleft = 0;
    while (busy && t < 2000) begin
      int c, k, er, lr;
      bit e_rd, e_loc;
      shift_e e_sh;
      if (t < SW_N) begin
        c = 0; k = t;
        e_rd = 1; er = k; e_sh = SH_UP; e_loc = (k >= 15); lr = k - 15;
      end else begin
        c = 1 + (t - SW_N) / 32; k = (t - SW_N) % 32;
        e_loc = 1;
        if (k == 0) begin
          e_rd = 0; er = -1; e_sh = SH_LEFT; lr = (c % 2) ? 31 : 0;
        end else if (c % 2) begin
          e_rd = 1; er = 31 - k; e_sh = SH_DOWN; lr = 31 - k;
        end else begin
          e_rd = 1; er = 15 + k; e_sh = SH_UP; lr = k;
        end
      end
      check(rd_en == e_rd && (!e_rd || (int'(rd_row) == er && int'(rd_col) == c)),
            $sformatf("t=%0d read en %0d row %0d col %0d", t, rd_en, rd_row, rd_col));
      check(shift == e_sh, $sformatf("t=%0d shift %0d exp %0d", t, shift, e_sh));
      check(loc_valid == e_loc, $sformatf("t=%0d loc_valid", t));
      if (e_loc) begin
        // zigzag order: location number nloc
        int zc, zr;
        zc = nloc / 32;
        zr = (zc % 2) ? 31 - (nloc % 32) : nloc % 32;
        check(zc == c && zr == lr, $sformatf("t=%0d zigzag", t));
        check(int'(loc_mv.x) == zc - 16 && int'(loc_mv.y) == zr - 16,
              $sformatf("t=%0d mv (%0d,%0d) exp (%0d,%0d)", t, loc_mv.x, loc_mv.y, zc-16, zr-16));
        check(loc_last == (nloc == 1023), $sformatf("t=%0d loc_last", t));
        nloc++;
      end
      if (shift == SH_LEFT) nleft++;
      @(negedge clk);
      t++;
    end
    check(t == 1039, $sformatf("busy for %0d cycles, expected 1039", t));
    check(nloc == 1024, $sformatf("%0d locations", nloc));
    check(nleft == 31, $sformatf("%0d left shifts", nleft));
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
