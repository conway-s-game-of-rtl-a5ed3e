// wordline_cond: wordline conditioning for the board register.
//
// For every row i a two-input NAND of wordline[i] and readen gives the
// active-low read strobe read_b[i], and an inverter after it the active-high
// read[i]; a second NAND with writeen and inverter give write_b[i] and
// write[i]. A row's cells are read (written) only while its wordline and
// the global read (write) enable are both high. Purely combinational; the
// gates are those of the chip's custom array.
module wordline_cond #(
  parameter int unsigned N = gol_pkg::BOARD_N
) (
  input  logic [N-1:0] wordline,
  input  logic         readen,
  input  logic         writeen,
  output logic [N-1:0] read,
  output logic [N-1:0] read_b,
  output logic [N-1:0] write,
  output logic [N-1:0] write_b
);

  always_comb begin
    read_b  = ~(wordline & {N{readen}});
    write_b = ~(wordline & {N{writeen}});
    read    = ~read_b;
    write   = ~write_b;
  end

endmodule
