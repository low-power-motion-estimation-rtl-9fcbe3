// ad_unit: registered absolute difference |srch - cur| of two 8-bit pixels,
// in one of three implementations selected by the MODE parameter.
//
// AD_STD follows the conventional circuit: an 8-bit comparator picks which
// operand is larger, two multiplexers route the larger one to the minuend,
// and an 8-bit subtractor writes the exact result into the AD register.
//
// AD_RADP and AD_EADP replace the comparator by comparison prediction: a
// one-bit prediction flip-flop says which operand is assumed larger. After
// reset it predicts that the current pixel is subtracted from the search
// pixel. The subtraction is done with one extra bit; if its sign bit is 1 the
// prediction was wrong, the prediction flip-flop is inverted for the next
// pixel, and the AD register is either cleared (AD_RADP, reset based) or
// left holding its previous value (AD_EADP, enable based). A wrong
// prediction therefore gives an approximate AD, traded for lower power.
//
// Timing: inputs sampled when en is high; ad is valid the cycle after.
// mispred is high in the cycle ad was produced by a wrong prediction. The
// prediction only advances on cycles with en high; this gating, the reset
// value 0 of the AD register and the mispred flag are this design's choices.
module ad_unit
  import me_pkg::*;
#(
  parameter ad_mode_e MODE = AD_STD
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  pixel_t cur,
  input  pixel_t srch,
  output pixel_t ad,
  output logic   mispred
);


  if (MODE == AD_STD) begin : g_std
    logic   cur_gt;
    pixel_t larger, smaller, diff;
    always_comb begin
      cur_gt = (cur > srch);
      larger    = cur_gt ? cur  : srch;
      smaller  = cur_gt ? srch : cur;
      diff   = larger - smaller;
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        ad      <= '0;
        mispred <= 1'b0;
      end else if (en) begin
        ad      <= diff;
        mispred <= 1'b0;
      end
  end else begin : g_cp
    logic           pred_r;   // 0: srch - cur, 1: cur - srch
    logic [PIX_W:0] diff;
    logic           sign;
    always_comb begin
      diff = pred_r ? ({1'b0, cur} - {1'b0, srch}) : ({1'b0, srch} - {1'b0, cur});
      sign = diff[PIX_W];
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        pred_r  <= 1'b0;
        ad      <= '0;
        mispred <= 1'b0;
      end else if (en) begin
        pred_r  <= pred_r ^ sign;
        mispred <= sign;
        if (!sign)
          ad <= diff[PIX_W-1:0];
        else if (MODE == AD_RADP)
          ad <= '0;
        // AD_EADP: register disabled, previous AD kept
      end
  end

endmodule
