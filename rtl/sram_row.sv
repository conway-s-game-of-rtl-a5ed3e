// sram_row: one row of the board register, N storage cells.
//
// All cells of a row share the row's read and write strobes from the
// wordline conditioning; cell j sits on bitline j. A write (strobe `write`
// set at a clock edge) loads all N bitline values into the row; while
// `read` is set each cell drives its stored value onto `bit_out`, which is
// zero otherwise so that the rows of a column can be ORed. The row is the
// eight-bit memory slice of the chip's custom array, repeated N times to
// form the full register, as on the chip. No reset.
module sram_row #(
  parameter int unsigned N = gol_pkg::BOARD_N
) (
  input  logic         clk,
  input  logic         write,
  input  logic         read,
  input  logic [N-1:0] bit_in,
  output logic [N-1:0] bit_out
);

  for (genvar c = 0; c < int'(N); c++) begin : g_cell
    sram12t_cell u_cell (
      .clk     (clk),
      .write   (write),
      .read    (read),
      .bit_in  (bit_in[c]),
      .bit_out (bit_out[c])
    );
  end

endmodule
