// pe256: processing element of the 16x16 systolic array.
//
// A PE keeps one pixel of the current macroblock for the whole search and
// one search-window pixel that moves through the array: each cycle the
// search register can take the pixel of the PE below (array shifts up),
// of the PE above (array shifts down), of the PE to its right (array shifts
// left) or keep its value. The absolute difference between the two pixels
// is computed by an ad_unit (standard or comparison-prediction) and
// registered.
//
// Timing: the search register changes on the clock edge of a shift; the AD
// of the pixel it then holds is captured on the next edge when ad_en is high
// and appears on ad one cycle after that. The current pixel is written when
// cur_we is high. Which neighbour feeds which shift follows the zigzag
// dataflow of the array; the separate current-pixel write port is this
// design's choice.
module pe256
  import me_pkg::*;
#(
  parameter ad_mode_e MODE = AD_STD
) (
  input  logic   clk,
  input  logic   rst_n,
  input  shift_e shift,
  input  pixel_t from_below,
  input  pixel_t from_above,
  input  pixel_t from_right,
  input  logic   cur_we,
  input  pixel_t cur_in,
  input  logic   ad_en,
  output pixel_t srch,
  output pixel_t ad,
  output logic   mispred
);

  pixel_t cur_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      srch  <= '0;
      cur_q <= '0;
    end else begin
      unique case (shift)
        SH_UP:   srch <= from_below;
        SH_DOWN: srch <= from_above;
        SH_LEFT: srch <= from_right;
        default: ;
      endcase
      if (cur_we) cur_q <= cur_in;
    end

  ad_unit #(.MODE(MODE)) u_ad (
    .clk, .rst_n, .en(ad_en), .cur(cur_q), .srch, .ad, .mispred
  );

endmodule
