// bitselector: cuts the three-cell window out of one board row.
//
// Combinational. `column` is one-hot and marks the cell under evaluation;
// bit N-1 is the left-most column. The output is {left, centre, right}:
// the cell and its two horizontal neighbours. A neighbour past the left or
// right edge of the board reads as dead (zero). When `zerorow` is set the
// row being read lies above the top or below the bottom of the board and
// the whole window is zero. The window and the edge handling are those of
// the original chip; that a `column` with no bit set gives zero is this
// version's choice.
module bitselector #(
  parameter int unsigned N = gol_pkg::BOARD_N
) (
  input  logic [N-1:0] column,
  input  logic         zerorow,
  input  logic [N-1:0] d,
  output logic [2:0]   q
);

  // the row with a dead cell added beyond each edge: ext[i+1] is d[i]
  logic [N+1:0] ext;
  assign ext = {1'b0, d, 1'b0};

  always_comb begin
    q = '0;
    for (int i = 0; i < int'(N); i++)
      if (column[i]) q |= ext[i +: 3];
    if (zerorow) q = '0;
  end

endmodule
