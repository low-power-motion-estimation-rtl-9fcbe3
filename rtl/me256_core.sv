// me256_core: 256-PE variable-block-size full-search motion estimation.
//
// For one 16x16 current macroblock it evaluates all 32x32 candidate blocks
// of a 47x47-pixel search window (motion vectors in [-16, 15]) and returns,
// for each of the 41 H.264 sub-blocks, the smallest SAD and its motion
// vector.
//
// Datapath: 17 search-window memories (sw_bank) each hold every 17th window
// column. Per cycle the control unit reads one row of 17 neighbouring
// columns; the horizontal rotator puts them in window order; 16 go to the
// edge row of the 16x16 systolic PE array and one to the column of 16
// temporary registers. The array shifts up or down by one row per cycle in
// a zigzag over the window columns, and left once between columns, using the
// temporary registers, so a new candidate block is complete every cycle
// without broadcasting and without duplicated data. Two adder trees form the
// 16 4x4 SADs and then all 41 VBS SADs, and a comparator bank keeps the
// minima.
//
// Pipeline, 8 cycles from read address to updated minima: memory read,
// horizontal shift into the PE registers, AD in the PEs, two cycles of 4x4
// adder tree, two cycles of VBS adder tree, comparison. A search takes 1039
// issue cycles plus this latency; done pulses when best_sad/best_mv are
// final.
//
// Interface: the window is written one pixel per cycle (sw_we, sw_col,
// sw_row, sw_pix) and the current block one row per cycle (cur_we,
// cur_row, cur_data) while no search runs; start launches the search. The
// write ports, the start/done handshake and the misprediction counter
// mispred_cnt are this design's choices.
// MODE/CHECKER select the absolute-difference circuit (see pe_array256).
module me256_core
  import me_pkg::*;
#(
  parameter ad_mode_e MODE    = AD_STD,
  parameter bit       CHECKER = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  // search window load
  input  logic       sw_we,
  input  logic [5:0] sw_col,
  input  logic [5:0] sw_row,
  input  pixel_t     sw_pix,
  // current macroblock load
  input  logic       cur_we,
  input  logic [3:0] cur_row,
  input  pixel_t     cur_data [MB_N],
  // search control
  input  logic       start,
  output logic       busy,
  output logic       done,
  // results
  output sad_t       best_sad [NSUB],
  output mv_t        best_mv  [NSUB],
  // absolute differences computed with a wrong comparison prediction
  output logic [31:0] mispred_cnt
);

  localparam int DEPTH = 3 * SW_N;
  localparam int AW    = $clog2(DEPTH);

  // ---------------- control ----------------
  logic       rd_en, loc_valid, loc_last, ctrl_busy;
  logic [5:0] rd_row;
  logic [4:0] rd_col;
  shift_e     shift;
  mv_t        loc_mv;

  me256_ctrl u_ctrl (
    .clk, .rst_n, .start(start && !busy), .busy(ctrl_busy),
    .rd_en, .rd_row, .rd_col, .shift, .loc_valid, .loc_mv, .loc_last
  );

  // ---------------- search-window memories ----------------
  pixel_t bank_q [NBANK];
  logic [4:0] rot_d1;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic [AW-1:0] raddr, waddr;
    logic          wsel;
    always_comb begin
      int x, off;
      off   = (b - int'(rd_col) % NBANK + NBANK) % NBANK;
      x     = int'(rd_col) + off;                       // window column in bank b
      raddr = AW'((x / NBANK) * SW_N + int'(rd_row));
      waddr = AW'((int'(sw_col) / NBANK) * SW_N + int'(sw_row));
      wsel  = sw_we && (int'(sw_col) % NBANK == b);
    end
    sw_bank #(.DEPTH(DEPTH)) u_bank (
      .clk, .we(wsel), .waddr, .wdata(sw_pix),
      .re(rd_en), .raddr, .rdata(bank_q[b])
    );
  end

  // ---------------- rotator, temp registers, PE array ----------------
  pixel_t rot_q [NBANK];
  pixel_t row_in [MB_N];
  pixel_t tmp_q [MB_N];
  shift_e shift_d1;

  h_rotator u_rot (.rot(rot_d1), .din(bank_q), .dout(rot_q));

  always_comb
    for (int k = 0; k < MB_N; k++) row_in[k] = rot_q[k];

  temp_regs u_tmp (.clk, .rst_n, .shift(shift_d1), .din(rot_q[NBANK-1]), .q(tmp_q));

  pixel_t ad [MB_N][MB_N];
  logic   ad_en;
  logic [MB_N*MB_N-1:0] mispred;

  pe_array256 #(.MODE(MODE), .CHECKER(CHECKER)) u_array (
    .clk, .rst_n, .shift(shift_d1), .row_in, .tmp_in(tmp_q),
    .cur_we, .cur_row, .cur_data, .ad_en, .ad, .mispred
  );

  // ---------------- adder trees and comparators ----------------
  sad_t sad16 [16];
  sad_t sad41 [NSUB];
  logic v16, v41;
  logic [2:0] vld_d;      // loc_valid delayed 1..3
  mv_t  mv_d  [7];        // loc_mv delayed 1..7
  logic [7:0] last_d;     // loc_last delayed 1..8

  assign ad_en = vld_d[1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rot_d1   <= '0;
      shift_d1 <= SH_HOLD;
      vld_d    <= '0;
      last_d   <= '0;
      for (int i = 0; i < 7; i++) mv_d[i] <= '0;
    end else begin
      rot_d1   <= 5'(int'(rd_col) % NBANK);
      shift_d1 <= shift;
      vld_d    <= {vld_d[1:0], loc_valid};
      last_d   <= {last_d[6:0], loc_last};
      mv_d[0]  <= loc_mv;
      for (int i = 1; i < 7; i++) mv_d[i] <= mv_d[i-1];
    end

  sad4x4_tree u_tree4 (.clk, .rst_n, .in_valid(vld_d[2]), .ad, .out_valid(v16), .sad(sad16));

  vbs_sad_tree u_tree41 (.clk, .rst_n, .in_valid(v16), .sad16, .out_valid(v41), .sad41);

  mv_comparator u_cmp (
    .clk, .rst_n, .clear(start && !busy), .in_valid(v41), .in_mv(mv_d[6]),
    .sad41, .best_sad, .best_mv
  );

  // Misprediction counter (cleared by start), for measuring the prediction
  // accuracy of the comparison-prediction PEs; always 0 with AD_STD.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mispred_cnt <= '0;
    else if (start && !busy) mispred_cnt <= '0;
    else if (vld_d[2]) mispred_cnt <= mispred_cnt + 32'($countones(mispred));

  assign done = last_d[7];
  assign busy = ctrl_busy || (last_d[6:0] != '0);

endmodule
