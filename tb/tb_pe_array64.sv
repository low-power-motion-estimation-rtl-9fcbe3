// tb_pe_array64: random fills, chain shifts, current-pixel writes and
// phases on the 16x4 array, against a model in which every array column is
// a 16-entry chain of search pixels (entry 4j+i = register i of PE(x,j)).
// Each cycle all 64 ADs are checked one cycle after their phase.
//
// The behaviour checked follows the original design; the stimulus, the
// reference computation and the cycle budget are this testbench's own.
module tb_pe_array64;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       shift = 0, fill_we = 0, cur_we = 0, ad_en = 0;
  logic [3:0] fill_pos = 0, cur_row = 0;
  logic [1:0] phase = 0;
  pixel_t     col_in [MB_N], cur_data [MB_N];
  pixel_t     ad [4][MB_N];

  pe_array64 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int s_m [MB_N][MB_N], c_m [MB_N][MB_N], ad_m [4][MB_N];   // [row][col]

  initial begin
    int n_sh;
    n_sh = 0;
    for (int r = 0; r < MB_N; r++)
      for (int x = 0; x < MB_N; x++) begin s_m[r][x] = 0; c_m[r][x] = 0; end
    for (int j = 0; j < 4; j++) for (int x = 0; x < MB_N; x++) ad_m[j][x] = 0;
    for (int x = 0; x < MB_N; x++) begin col_in[x] = 0; cur_data[x] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int op;
      @(negedge clk);
      for (int j = 0; j < 4; j++)
        for (int x = 0; x < MB_N; x++)
          check(int'(ad[j][x]) == ad_m[j][x], $sformatf("t=%0d PE(%0d,%0d) ad %0d exp %0d", t, x, j, ad[j][x], ad_m[j][x]));
      op = $urandom_range(0, 3);
      shift = (op == 0); fill_we = (op == 1);
      fill_pos = 4'($urandom_range(0, 15));
      cur_we = ($urandom_range(0, 3) == 0); cur_row = 4'($urandom_range(0, 15));
      phase = 2'($urandom_range(0, 3));
      ad_en = ($urandom_range(0, 5) != 0);
      for (int x = 0; x < MB_N; x++) begin col_in[x] = pixel_t'($urandom); cur_data[x] = pixel_t'($urandom); end
      if (ad_en)
        for (int j = 0; j < 4; j++)
          for (int x = 0; x < MB_N; x++) begin
            int a, b;
            a = s_m[4*j + phase][x]; b = c_m[4*j + phase][x];
            ad_m[j][x] = a > b ? a - b : b - a;
          end
      for (int x = 0; x < MB_N; x++) begin
        if (shift) begin
          for (int r = 0; r < MB_N-1; r++) s_m[r][x] = s_m[r+1][x];
          s_m[MB_N-1][x] = col_in[x];
        end else if (fill_we) s_m[fill_pos][x] = col_in[x];
        if (cur_we) c_m[cur_row][x] = cur_data[x];
      end
      if (shift) n_sh++;
    end
    check(n_sh > 0, "shifts exercised");
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
