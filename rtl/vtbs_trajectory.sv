// vtbs_trajectory: integer-pixel MV trajectory estimation for vector
// trajectory based half-pixel search (VTBS).
//
// Half-pixel ME normally evaluates the 8 half-pixel positions around the
// best integer-pixel MV (2-D search). If the integer MV points clearly along
// one axis, the motion is assumed to lie on that axis and only the 2
// half-pixel positions on it are searched (1-D search), which also removes
// the interpolation of the half pixels that only the other positions need.
// METHOD selects the criterion:
//   TR_BT  (bigger than, the one used in hardware): 1-D along the component
//          with the larger magnitude; 2-D when |x| == |y|.
//   TR_TBT (twice bigger than): 1-D along a component whose magnitude is at
//          least twice the other's; otherwise 2-D.
//   TR_Z   (zero): 1-D along y if x == 0 and y != 0, along x if y == 0 and
//          x != 0; otherwise 2-D.
// A zero MV always gives 2-D search.
//
// The hardware is one absolute-difference stage (|x|, |y|) and two magnitude
// comparators. loc_mask marks the half-pixel positions to search, bit order
// (dx,dy) = (-,-) (0,-) (+,-) (-,0) (+,0) (-,+) (0,+) (+,+) for bits 0..7.
//
// Timing: one cycle from in_valid to out_valid. The zero-MV rule, the mask
// encoding and the registered interface are this design's choices.
module vtbs_trajectory
  import me_pkg::*;
#(
  parameter traj_method_e METHOD = TR_BT
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  mv_t      ip_mv,
  output logic     out_valid,
  output hp_mode_e mode,
  output logic [7:0] loc_mask
);

  logic [MV_W-1:0] ax, ay;
  logic            x_gt, y_gt;
  hp_mode_e        mode_d;

  always_comb begin
    ax = ip_mv.x[MV_W-1] ? MV_W'(-ip_mv.x) : MV_W'(ip_mv.x);
    ay = ip_mv.y[MV_W-1] ? MV_W'(-ip_mv.y) : MV_W'(ip_mv.y);
    unique case (METHOD)
      TR_Z: begin
        x_gt = (ay == '0) && (ax != '0);
        y_gt = (ax == '0) && (ay != '0);
      end
      TR_TBT: begin
        x_gt = (ax != '0) && ({1'b0, ax} >= {ay, 1'b0});
        y_gt = (ay != '0) && ({1'b0, ay} >= {ax, 1'b0});
      end
      default: begin
        x_gt = (ax > ay);
        y_gt = (ay > ax);
      end
    endcase
    mode_d = x_gt ? HP_1D_X : (y_gt ? HP_1D_Y : HP_2D);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      mode      <= HP_2D;
      loc_mask  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mode <= mode_d;
        unique case (mode_d)
          HP_1D_X: loc_mask <= 8'b0001_1000;
          HP_1D_Y: loc_mask <= 8'b0100_0010;
          default: loc_mask <= 8'b1111_1111;
        endcase
      end
    end

endmodule
