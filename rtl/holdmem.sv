// holdmem: collects three row windows into a 3x3 neighbourhood.
//
// Three 3-bit registers form a shift chain. Each cycle with `en` set the
// window from the bit selector enters stage 1 and the older ones move on,
// so after three shifts (row above, own row, row below) stage 3 holds the
// row above, stage 2 the cell's own row and stage 1 the row below. The
// centre bit of stage 2 is the cell; the other eight bits are its
// neighbours, given to the output logic. Windows are {left, centre, right}.
// The stage order and neighbour packing are the original chip's; the
// synchronous active-high reset, which clears all stages, is this version's.
module holdmem (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [2:0] row,
  output logic       cellbit,
  output logic [7:0] eightbits
);

  logic [2:0] stage1, stage2, stage3;

  always_ff @(posedge clk) begin
    if (rst) begin
      stage1 <= '0;
      stage2 <= '0;
      stage3 <= '0;
    end else if (en) begin
      stage1 <= row;
      stage2 <= stage1;
      stage3 <= stage2;
    end
  end

  assign cellbit   = stage2[1];
  assign eightbits = {stage1, stage2[2], stage2[0], stage3};

endmodule
