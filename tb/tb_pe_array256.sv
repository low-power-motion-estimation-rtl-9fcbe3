// tb_pe_array256: drives the 16x16 array with random shift commands, new
// rows and temporary-register columns, keeps a model of every PE's search
// pixel, and checks all 256 ADs each cycle. The array is built with reset
// based prediction on the checkerboard (CR-ADP), so both the exact PEs and
// the predicting PEs are checked against their models.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_pe_array256;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  shift_e     shift = SH_HOLD;
  pixel_t     row_in [MB_N], tmp_in [MB_N], cur_data [MB_N];
  logic       cur_we = 0, ad_en = 0;
  logic [3:0] cur_row = 0;
  pixel_t     ad [MB_N][MB_N];
  logic [MB_N*MB_N-1:0] mispred;

  pe_array256 #(.MODE(AD_RADP), .CHECKER(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int s_m [MB_N][MB_N], c_m [MB_N][MB_N], ad_m [MB_N][MB_N];
  bit p_m [MB_N][MB_N];
  int n_mis = 0, n_shift [4] = '{0, 0, 0, 0};

  initial begin
    for (int i = 0; i < MB_N; i++) begin row_in[i] = 0; tmp_in[i] = 0; cur_data[i] = 0; end
    for (int y = 0; y < MB_N; y++)
      for (int x = 0; x < MB_N; x++) begin s_m[y][x] = 0; c_m[y][x] = 0; ad_m[y][x] = 0; p_m[y][x] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load the current block
    for (int r = 0; r < MB_N; r++) begin
      @(negedge clk);
      cur_we = 1; cur_row = 4'(r);
      for (int x = 0; x < MB_N; x++) begin
        cur_data[x] = pixel_t'(110 + $urandom_range(0, 40));
        c_m[r][x] = cur_data[x];
      end
    end
    @(negedge clk);
    cur_we = 0;
    for (int i = 0; i < 600; i++) begin
      int ns [MB_N][MB_N];
      @(negedge clk);
      for (int y = 0; y < MB_N; y++)
        for (int x = 0; x < MB_N; x++)
          check(int'(ad[y][x]) == ad_m[y][x],
                $sformatf("cycle %0d PE(%0d,%0d) ad %0d exp %0d", i, x, y, ad[y][x], ad_m[y][x]));
      shift = shift_e'($urandom_range(0, 3));
      n_shift[shift]++;
      ad_en = ($urandom_range(0, 7) != 0);
      for (int k = 0; k < MB_N; k++) begin
        row_in[k] = pixel_t'(100 + $urandom_range(0, 60));
        tmp_in[k] = pixel_t'(100 + $urandom_range(0, 60));
      end
      // AD captured at the next edge from the present search pixels
      if (ad_en)
        for (int y = 0; y < MB_N; y++)
          for (int x = 0; x < MB_N; x++) begin
            int d;
            if ((x + y) % 2 == 0) begin
              ad_m[y][x] = (s_m[y][x] > c_m[y][x]) ? s_m[y][x] - c_m[y][x] : c_m[y][x] - s_m[y][x];
            end else begin
              d = p_m[y][x] ? c_m[y][x] - s_m[y][x] : s_m[y][x] - c_m[y][x];
              if (d < 0) begin ad_m[y][x] = 0; p_m[y][x] = !p_m[y][x]; n_mis++; end
              else ad_m[y][x] = d;
            end
          end
      for (int y = 0; y < MB_N; y++)
        for (int x = 0; x < MB_N; x++)
          case (shift)
            SH_UP:   ns[y][x] = (y == MB_N-1) ? int'(row_in[x]) : s_m[y+1][x];
            SH_DOWN: ns[y][x] = (y == 0) ? int'(row_in[x]) : s_m[y-1][x];
            SH_LEFT: ns[y][x] = (x == MB_N-1) ? int'(tmp_in[y]) : s_m[y][x+1];
            default: ns[y][x] = s_m[y][x];
          endcase
      s_m = ns;
    end
    check(n_mis > 0 && n_shift[1] > 0 && n_shift[2] > 0 && n_shift[3] > 0,
          "all shifts and mispredictions exercised");
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
