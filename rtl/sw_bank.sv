// sw_bank: one of the 17 search-window memories (an FPGA block RAM).
//
// Memory b holds the search-window columns X with X mod 17 = b, so any 17
// neighbouring columns lie in 17 different memories and one row of them can
// be read in a single cycle. The word address is (X / 17) * 47 + row, one
// 8-bit pixel per word, DEPTH = 3 * 47 words.
//
// Timing: one write port (we/waddr/wdata) and one synchronous read port;
// rdata shows the word at raddr one cycle after an edge with re high and
// holds otherwise. The write port and its width are this design's choice.
module sw_bank
  import me_pkg::*;
#(
  parameter int DEPTH = 3 * SW_N,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  pixel_t        wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output pixel_t        rdata
);

  pixel_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
