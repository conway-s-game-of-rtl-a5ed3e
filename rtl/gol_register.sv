// gol_register: the N x N register that stores the Life board.
//
// Built like the chip's custom array: wordline conditioning turns the
// one-hot `wordline` and the global `readen`/`writeen` into per-row read
// and write strobes, N rows of N storage cells (sram_row) hold the board, and
// bitline conditioning joins each column's cells to one bitline that is
// driven by `bitline_write` during a write and by the selected row's cells
// during a read. Row i of the board is wordline bit i (bit N-1 is the top
// row) and column j is bitline bit j (bit N-1 is the left-most column).
//
// Timing: a read is combinational (`bitline_read` follows `wordline` and
// `readen` in the same cycle); a write takes effect at the clock edge that
// ends the cycle with `writeen` set. With neither enable set,
// `bitline_read` is zero. The array has no reset. The controller must
// select at most one row and never read and write at once; assertions
// check this, and that each row's strobes and their complements, which the
// transistor cells need, stay complementary.
module gol_register #(
  parameter int unsigned N = gol_pkg::BOARD_N
) (
  input  logic         clk,
  input  logic         writeen,
  input  logic         readen,
  input  logic [N-1:0] wordline,
  input  logic [N-1:0] bitline_write,
  output logic [N-1:0] bitline_read
);

  logic [N-1:0] read, write, read_b, write_b;
  logic [N-1:0] bitline;
  logic [N-1:0] cell_out [N];   // cell_out[row][col]
  logic [N-1:0] cell_drive;

  wordline_cond #(.N(N)) u_wordline (
    .wordline (wordline),
    .readen   (readen),
    .writeen  (writeen),
    .read     (read),
    .read_b   (read_b),
    .write    (write),
    .write_b  (write_b)
  );

  for (genvar r = 0; r < int'(N); r++) begin : g_row
    sram_row #(.N(N)) u_row (
      .clk     (clk),
      .write   (write[r]),
      .read    (read[r]),
      .bit_in  (bitline),
      .bit_out (cell_out[r])
    );
  end

  always_comb begin
    cell_drive = '0;
    for (int r = 0; r < int'(N); r++) cell_drive |= cell_out[r];
  end

  bitline_cond #(.N(N)) u_bitline (
    .writeen       (writeen),
    .bitline_write (bitline_write),
    .cell_drive    (cell_drive),
    .bitline       (bitline),
    .bitline_read  (bitline_read)
  );

  always_ff @(posedge clk) begin
    assert ((read ^ read_b) == '1 && (write ^ write_b) == '1)
      else $error("gol_register: row strobes not complementary");
    if (readen || writeen) begin
      assert ($onehot0(wordline))
        else $error("gol_register: more than one wordline active: %b", wordline);
      assert (!(readen && writeen))
        else $error("gol_register: read and write in the same cycle");
    end
  end

endmodule
