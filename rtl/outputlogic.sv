// outputlogic: the Life rule for one cell.
//
// Combinational. The eight neighbour bits are summed and the cell's next
// value is produced: a live cell stays alive with two or three live
// neighbours, a dead cell comes alive with exactly three, every other cell
// is dead next generation. The adder-and-compare structure is the original
// chip's; the neighbour order inside `eightbits` does not matter.
//
//   cellbit      current value of the cell
//   eightbits    its eight neighbours, in any order
//   newcellvalue value of the cell in the next generation
module outputlogic (
  input  logic       cellbit,
  input  logic [7:0] eightbits,
  output logic       newcellvalue
);

  logic [3:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 8; i++) sum += 4'(eightbits[i]);
    newcellvalue = (sum == 4'd3) || (sum == 4'd2 && cellbit);
  end

endmodule
