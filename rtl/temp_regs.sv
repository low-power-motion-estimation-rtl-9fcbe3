// temp_regs: column of 16 8-bit temporary registers beside the PE array.
//
// While the PE array scans one search-window column, these registers are
// filled with the pixels of the window column just to the right of the
// array, read from the 17th memory. They shift in the same direction as the
// array (up: new pixel enters reg 15; down: new pixel enters reg 0), so when
// the column is finished they hold exactly the 16 pixels the rightmost PE
// column needs for the left shift. Register index equals PE row index.
//
// Timing: one shift per clock edge as given by shift; SH_LEFT and SH_HOLD
// keep the contents.
//
// The 16-register pipeline fed by the seventeenth memory follows the
// original design; shifting it in the same direction as the array is read
// from the original data-flow schedule.
module temp_regs
  import me_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  shift_e shift,
  input  pixel_t din,
  output pixel_t q [MB_N]
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < MB_N; i++) q[i] <= '0;
    end else begin
      unique case (shift)
        SH_UP: begin
          for (int i = 0; i < MB_N-1; i++) q[i] <= q[i+1];
          q[MB_N-1] <= din;
        end
        SH_DOWN: begin
          for (int i = 1; i < MB_N; i++) q[i] <= q[i-1];
          q[0] <= din;
        end
        default: ;
      endcase
    end

endmodule
