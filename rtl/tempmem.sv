// tempmem: holds new cell values until the old row can be overwritten.
//
// A 2N-bit shift register. Each cycle with `newbiten` set the new value of
// one cell enters at bit 0, so a row computed left to right ends with its
// left-most cell in the row's top bit. The lower half holds the row just
// computed and the upper half the row before it. The old values of a row
// are still needed while the row below it is computed, so the controller
// writes back the upper half (`finalrow` low); after the last row of the
// board it writes back the lower half (`finalrow` high).
// Size and selection follow the original chip; the synchronous active-high
// reset, which clears the register, is this version's.
module tempmem #(
  parameter int unsigned N = gol_pkg::BOARD_N
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         newbiten,
  input  logic         finalrow,
  input  logic         q,
  output logic [N-1:0] row2
);

  logic [2*N-1:0] tworows;

  always_ff @(posedge clk) begin
    if (rst)           tworows <= '0;
    else if (newbiten) tworows <= {tworows[2*N-2:0], q};
  end

  assign row2 = finalrow ? tworows[N-1:0] : tworows[2*N-1:N];

endmodule
