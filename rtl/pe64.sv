// pe64: processing element of the 64-PE (16x4) motion estimation array.
//
// A PE covers four vertically adjacent pixels of one macroblock column: it
// has four current-pixel registers, loaded once per macroblock, and four
// search-pixel registers. The search registers of the four PEs of an array
// column form one 16-pixel chain: on shift, reg0 <- reg1 <- reg2 <- reg3 <-
// shift_in, and reg0 leaves through shift_out to the PE above. This moves
// the candidate block one row down the search window with a single new
// pixel per array column. At the start of a window column the registers are
// written directly instead (fill_we). In each of four phase cycles the PE
// computes the absolute difference of register pair 'phase', so it
// evaluates one candidate block in four cycles.
//
// Timing: register writes on the clock edge; ad is the registered AD of the
// pair selected by phase in the cycle before, updated when ad_en is high.
//
// Four search and four current registers per PE and one absolute difference
// per cycle follow the original 64-PE design; the direct fill write port and
// the register order are this design's choice.
module pe64
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       shift,
  input  pixel_t     shift_in,
  output pixel_t     shift_out,
  input  logic [3:0] fill_we,
  input  pixel_t     fill_data,
  input  logic [3:0] cur_we,
  input  pixel_t     cur_in,
  input  logic [1:0] phase,
  input  logic       ad_en,
  output pixel_t     ad
);

  pixel_t sreg [4];
  pixel_t creg [4];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        sreg[i] <= '0;
        creg[i] <= '0;
      end
    end else begin
      if (shift) begin
        for (int i = 0; i < 3; i++) sreg[i] <= sreg[i+1];
        sreg[3] <= shift_in;
      end else begin
        for (int i = 0; i < 4; i++) if (fill_we[i]) sreg[i] <= fill_data;
      end
      for (int i = 0; i < 4; i++) if (cur_we[i]) creg[i] <= cur_in;
    end

  assign shift_out = sreg[0];

  logic unused_mp;
  ad_unit #(.MODE(AD_STD)) u_ad (
    .clk, .rst_n, .en(ad_en), .cur(creg[phase]), .srch(sreg[phase]), .ad, .mispred(unused_mp)
  );

endmodule
