// core: the Game of Life chip core, an N x N board (8 x 8 by default).
//
// The user enters a starting board one row per press of `enter`, reading
// the row from the N switches (1 = live cell), top row first. From then on
// every press of `enter` replaces the board by its next generation under
// Conway's rules; cells outside the board count as dead. `rst` starts a
// new game: the board is cleared and row input begins again. The board is
// shown at all times on an N x N LED matrix by row multiplexing:
// `ledpower` is a one-hot row drive (bit N-1 = top row) and `ledcolumn` the
// cells of the powered row (bit N-1 = left-most column).
//
// The core is the synthesized logic (gameoflife) wired to the board
// register (gol_register), as on the chip. One clock `clk` drives all
// registers; `rst` is synchronous and active high. An enter press must be
// seen at a rising clock edge and is acted on at the end of the current
// display scan (at most 8 x 16 cycles later); a generation takes 207 cycles
// on the 8 x 8 board.
module core #(
  parameter int unsigned N = gol_pkg::BOARD_N
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enter,
  input  logic [N-1:0] switches,
  output logic [N-1:0] ledpower,
  output logic [N-1:0] ledcolumn
);

  logic [N-1:0] bitline_read, bitline_write, wordline;
  logic         write_en, read_en;

  gameoflife #(.N(N)) u_gameoflife (
    .clk           (clk),
    .rst           (rst),
    .enter         (enter),
    .switches      (switches),
    .bitline_read  (bitline_read),
    .ledpower      (ledpower),
    .ledcolumn     (ledcolumn),
    .write_en      (write_en),
    .read_en       (read_en),
    .wordline      (wordline),
    .bitline_write (bitline_write)
  );

  gol_register #(.N(N)) u_register (
    .clk           (clk),
    .writeen       (write_en),
    .readen        (read_en),
    .wordline      (wordline),
    .bitline_write (bitline_write),
    .bitline_read  (bitline_read)
  );

endmodule
