// h_rotator: horizontal rotator between the 17 search-window memories and
// the PE array.
//
// The memories always deliver the pixels of one search-window row in memory
// order (memory b holds columns with X mod 17 = b), but the array needs them
// in window order starting at the current search column c. The rotator is a
// 17-way cyclic rotation by rot = c mod 17: dout[k] = din[(rot + k) mod 17].
// Outputs 0..15 feed the PE array columns 0..15 and output 16 feeds the
// temporary registers.
//
// Timing: combinational; the PE search registers and temporary registers
// that it feeds form the horizontal-shifting pipeline stage.
//
// The rotation of the 17 memory outputs into window order follows the
// original architecture; making it a purely combinational stage (the
// register after it being the PE/temporary register) is this design's
// choice.
module h_rotator
  import me_pkg::*;
(
  input  logic [4:0] rot,
  input  pixel_t     din  [NBANK],
  output pixel_t     dout [NBANK]
);

  always_comb
    for (int k = 0; k < NBANK; k++)
      dout[k] = din[(int'(rot) + k) % NBANK];

endmodule
