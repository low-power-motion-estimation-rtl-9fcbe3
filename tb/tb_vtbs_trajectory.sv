// tb_vtbs_trajectory: every integer MV of the [-16, 15] range through one
// instance per criterion (bigger than, twice bigger than, zero). The
// expected decision follows the criteria's definitions, written here with
// integer magnitudes; the half-pixel position mask and the one-cycle
// latency are checked too.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_vtbs_trajectory;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  mv_t  ip_mv = '0;
  logic ov [3];
  hp_mode_e mode [3];
  logic [7:0] mask [3];

  vtbs_trajectory #(.METHOD(TR_BT))  u_bt  (.clk, .rst_n, .in_valid, .ip_mv, .out_valid(ov[0]), .mode(mode[0]), .loc_mask(mask[0]));
  vtbs_trajectory #(.METHOD(TR_TBT)) u_tbt (.clk, .rst_n, .in_valid, .ip_mv, .out_valid(ov[1]), .mode(mode[1]), .loc_mask(mask[1]));
  vtbs_trajectory #(.METHOD(TR_Z))   u_z   (.clk, .rst_n, .in_valid, .ip_mv, .out_valid(ov[2]), .mode(mode[2]), .loc_mask(mask[2]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic hp_mode_e expect_mode(int m, int x, int y);
    int ax, ay;
    ax = x < 0 ? -x : x;
    ay = y < 0 ? -y : y;
    case (m)
      0: return ax > ay ? HP_1D_X : (ay > ax ? HP_1D_Y : HP_2D);
      1: return (ax > 0 && ax >= 2*ay) ? HP_1D_X : ((ay > 0 && ay >= 2*ax) ? HP_1D_Y : HP_2D);
      default: return (y == 0 && x != 0) ? HP_1D_X : ((x == 0 && y != 0) ? HP_1D_Y : HP_2D);
    endcase
  endfunction

  int n1d [3] = '{0, 0, 0};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int x = -16; x < 16; x++)
      for (int y = -16; y < 16; y++) begin
        @(negedge clk);
        in_valid = 1; ip_mv.x = MV_W'(x); ip_mv.y = MV_W'(y);
        @(negedge clk);
        in_valid = 0;
        for (int m = 0; m < 3; m++) begin
          hp_mode_e e;
          logic [7:0] em;
          e = expect_mode(m, x, y);
          em = (e == HP_1D_X) ? 8'b0001_1000 : (e == HP_1D_Y) ? 8'b0100_0010 : 8'hFF;
          check(ov[m] && mode[m] == e && mask[m] == em,
                $sformatf("method %0d mv (%0d,%0d) mode %0d exp %0d", m, x, y, mode[m], e));
          if (e != HP_2D) n1d[m]++;
        end
        @(negedge clk);
        for (int m = 0; m < 3; m++) check(!ov[m], "out_valid one cycle");
      end
    // share of 1-D decisions over all MVs: BT > TBT > Z, as intended
    check(n1d[0] > n1d[1] && n1d[1] > n1d[2], "criteria ordering");
    $display("1-D share: BT %0d TBT %0d Z %0d of 1024", n1d[0], n1d[1], n1d[2]);
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
