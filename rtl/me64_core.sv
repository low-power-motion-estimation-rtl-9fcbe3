// me64_core: 64-PE variable-block-size full-search motion estimation, the
// smaller of the two integer-pixel ME architectures.
//
// Same task as me256_core: 41 best SADs and MVs of a 16x16 block over a
// 47x47 window, MVs in [-16, 15]. A 16x4 array of PEs (pe_array64), each
// with four search and four current registers, evaluates one candidate
// block every four cycles; per window column each PE column first loads 16
// pixels, then receives one new pixel every four cycles while the column
// chain shifts, so the memory bandwidth is one pixel per PE column per
// candidate block. The 4x4 SADs are accumulated over the four phases
// (sad_acc64), the other 37 SADs come from the VBS adder tree and a
// comparator bank keeps the minima. The window sits in 17 column-interleaved
// memories as in me256_core and a rotator puts the 16 columns in order.
//
// A search takes 32 columns x 140 cycles plus a 7-cycle tail until done.
// Interface as me256_core (window and current-block write ports, start,
// busy, done); these ports are this design's choices.
module me64_core
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sw_we,
  input  logic [5:0] sw_col,
  input  logic [5:0] sw_row,
  input  pixel_t     sw_pix,
  input  logic       cur_we,
  input  logic [3:0] cur_row,
  input  pixel_t     cur_data [MB_N],
  input  logic       start,
  output logic       busy,
  output logic       done,
  output sad_t       best_sad [NSUB],
  output mv_t        best_mv  [NSUB]
);

  localparam int DEPTH = 3 * SW_N;
  localparam int AW    = $clog2(DEPTH);

  logic       rd_en, rd_fill, rd_shift, phase_valid, loc_last, ctrl_busy;
  logic [3:0] rd_pos;
  logic [5:0] rd_row;
  logic [4:0] rd_col;
  logic [1:0] phase;
  mv_t        loc_mv;

  me64_ctrl u_ctrl (
    .clk, .rst_n, .start(start && !busy), .busy(ctrl_busy),
    .rd_en, .rd_fill, .rd_shift, .rd_pos, .rd_row, .rd_col,
    .phase_valid, .phase, .loc_mv, .loc_last
  );

  // search-window memories: bank b holds columns X with X mod 17 = b
  pixel_t bank_q [NBANK];
  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic [AW-1:0] raddr, waddr;
    logic          wsel;
    always_comb begin
      int x, off;
      off   = (b - int'(rd_col) % NBANK + NBANK) % NBANK;
      x     = int'(rd_col) + off;
      raddr = AW'((x / NBANK) * SW_N + int'(rd_row));
      waddr = AW'((int'(sw_col) / NBANK) * SW_N + int'(sw_row));
      wsel  = sw_we && (int'(sw_col) % NBANK == b);
    end
    sw_bank #(.DEPTH(DEPTH)) u_bank (
      .clk, .we(wsel), .waddr, .wdata(sw_pix),
      .re(rd_en), .raddr, .rdata(bank_q[b])
    );
  end

  logic [4:0] rot_d1;
  logic       fill_d1, shift_d1;
  logic [3:0] pos_d1;
  pixel_t     rot_q [NBANK];
  pixel_t     col_in [MB_N];

  h_rotator u_rot (.rot(rot_d1), .din(bank_q), .dout(rot_q));
  always_comb
    for (int k = 0; k < MB_N; k++) col_in[k] = rot_q[k];

  pixel_t ad [4][MB_N];

  pe_array64 u_array (
    .clk, .rst_n, .shift(shift_d1), .fill_we(fill_d1), .fill_pos(pos_d1), .col_in,
    .cur_we, .cur_row, .cur_data, .phase, .ad_en(phase_valid), .ad
  );

  // pipeline alignment
  logic       acc_valid, v16, v41;
  logic [1:0] acc_phase;
  mv_t        mv_d [4];
  logic [4:0] last_d;
  sad_t       sad16 [16];
  sad_t       sad41 [NSUB];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rot_d1    <= '0;
      fill_d1   <= 1'b0;
      shift_d1  <= 1'b0;
      pos_d1    <= '0;
      acc_valid <= 1'b0;
      acc_phase <= '0;
      last_d    <= '0;
      for (int i = 0; i < 4; i++) mv_d[i] <= '0;
    end else begin
      rot_d1    <= 5'(int'(rd_col) % NBANK);
      fill_d1   <= rd_fill;
      shift_d1  <= rd_shift;
      pos_d1    <= rd_pos;
      acc_valid <= phase_valid;
      acc_phase <= phase;
      last_d    <= {last_d[3:0], loc_last};
      mv_d[0]   <= loc_mv;
      for (int i = 1; i < 4; i++) mv_d[i] <= mv_d[i-1];
    end

  sad_acc64 u_acc (.clk, .rst_n, .in_valid(acc_valid), .phase(acc_phase), .ad,
                   .out_valid(v16), .sad(sad16));

  vbs_sad_tree u_tree41 (.clk, .rst_n, .in_valid(v16), .sad16, .out_valid(v41), .sad41);

  mv_comparator u_cmp (
    .clk, .rst_n, .clear(start && !busy), .in_valid(v41), .in_mv(mv_d[3]),
    .sad41, .best_sad, .best_mv
  );

  assign done = last_d[4];
  assign busy = ctrl_busy || (last_d[3:0] != '0);

endmodule
