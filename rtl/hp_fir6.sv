// hp_fir6: six-tap half-pixel interpolation filter of H.264.
//
// half = (A - 5B + 20C + 20D - 5E + F) / 32 for six neighbouring pixels in a
// row or a column, C and D being the two next to the half-pixel position.
// The division is done with rounding, (sum + 16) >> 5, and the result is
// clipped to 0..255 as in the H.264 standard. The inputs may be integer
// pixels or previously interpolated half pixels (for the centre half
// pixels).
//
// Timing: one register stage; out_valid follows in_valid by one cycle.
module hp_fir6
  import me_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t tap [6],      // A, B, C, D, E, F
  output logic   out_valid,
  output pixel_t half
);

  logic signed [14:0] sum;
  logic signed [14:0] rnd;

  always_comb begin
    sum = 15'(tap[0]) - 15'(tap[1]) * 15'sd5 + 15'(tap[2]) * 15'sd20
        + 15'(tap[3]) * 15'sd20 - 15'(tap[4]) * 15'sd5 + 15'(tap[5]);
    rnd = (sum + 15'sd16) >>> 5;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      half      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (rnd < 0)             half <= '0;
        else if (rnd > 15'sd255) half <= 8'd255;
        else                     half <= pixel_t'(rnd);
      end
    end

endmodule
