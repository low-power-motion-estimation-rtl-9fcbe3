// me64_ctrl: control unit of the 64-PE full-search ME hardware.
//
// The search window is processed one window column c at a time, top to
// bottom, 140 cycles per column. A read counter (rd_*) drives the memories:
// in cycles 0..15 of a column it reads rows 0..15 to fill the PE registers
// directly (rd_fill, rd_pos); then, every fourth cycle from cycle 16 to
// 136, it reads the next row 16..46 for a one-row shift (rd_shift). A
// compute counter, running 14 cycles behind, sweeps the four phases of the
// 32 candidate blocks of the column (cycles 0..127 of its own column
// count): phase_valid, phase, loc_mv and loc_last (set on phase 3 of the
// final block). The fill of the next column overlaps the last phases of the
// previous one, which only use registers the fill has not yet rewritten.
//
// Timing: rd_* are issue-cycle signals (memory data follow one cycle
// later); phase_* apply to the PE array in the same cycle. start (while
// idle) begins a search; busy stays high until the last phase.
//
// The 140-cycle column period (16 fill reads, then one new row every 4
// cycles) follows the original 64-PE data-flow schedule; the counters, the
// 14-cycle lag of the compute counter and the handshake are this design's
// choice.
module me64_ctrl
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       rd_en,
  output logic       rd_fill,
  output logic       rd_shift,
  output logic [3:0] rd_pos,
  output logic [5:0] rd_row,
  output logic [4:0] rd_col,
  output logic       phase_valid,
  output logic [1:0] phase,
  output mv_t        loc_mv,
  output logic       loc_last
);

  localparam int COL_CYC  = 140;   // cycles per window column
  localparam int CP_DELAY = 14;    // compute counter lag

  logic       rd_busy, cp_busy;
  logic [7:0] rd_t, cp_t;
  logic [4:0] cp_col;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_busy <= 1'b0;
      rd_t    <= '0;
      rd_col  <= '0;
      cp_busy <= 1'b0;
      cp_t    <= '0;
      cp_col  <= '0;
    end else begin
      if (!busy && start) begin
        rd_busy <= 1'b1;
        rd_t    <= '0;
        rd_col  <= '0;
      end else if (rd_busy) begin
        if (rd_t == 8'(COL_CYC-1)) begin
          rd_t   <= '0;
          rd_col <= rd_col + 5'd1;
          if (rd_col == 5'(NLOC-1)) rd_busy <= 1'b0;
        end else begin
          rd_t <= rd_t + 8'd1;
        end
      end
      if (rd_busy && rd_col == 5'd0 && rd_t == 8'(CP_DELAY-1)) begin
        cp_busy <= 1'b1;
        cp_t    <= '0;
        cp_col  <= '0;
      end else if (cp_busy) begin
        if (cp_col == 5'(NLOC-1) && cp_t == 8'(4*NLOC-1)) begin
          cp_busy <= 1'b0;
        end else if (cp_t == 8'(COL_CYC-1)) begin
          cp_t   <= '0;
          cp_col <= cp_col + 5'd1;
        end else begin
          cp_t <= cp_t + 8'd1;
        end
      end
    end

  assign busy = rd_busy || cp_busy;

  always_comb begin
    rd_fill  = rd_busy && (rd_t < 8'(MB_N));
    rd_shift = rd_busy && (rd_t >= 8'(MB_N)) && (rd_t <= 8'(COL_CYC-4)) && (rd_t[1:0] == 2'd0);
    rd_en    = rd_fill || rd_shift;
    rd_pos   = rd_t[3:0];
    rd_row   = rd_fill ? 6'(rd_t) : 6'(MB_N - 1 + (int'(rd_t) - 12) / 4);

    phase_valid = cp_busy && (cp_t < 8'(4*NLOC));
    phase       = cp_t[1:0];
    loc_mv.x    = MV_W'(signed'({1'b0, cp_col}) - RANGE);
    loc_mv.y    = MV_W'(signed'({1'b0, cp_t[6:2]}) - RANGE);
    loc_last    = cp_busy && (cp_col == 5'(NLOC-1)) && (cp_t == 8'(4*NLOC-1));
  end

endmodule
