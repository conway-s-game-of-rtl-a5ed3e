// bitline_cond: bitline conditioning for the board register.
//
// Each column of the register has one bitline shared by writes and reads.
// On the write side a tristate buffer, enabled by writeen, drives the
// column's write data onto the bitline; when it is off, the cells of the
// row being read drive it. On the read side a buffer takes the bitline out
// as bitline_read. In this synthesizable form the tristate bus is a
// multiplexer: the bitline is `bitline_write` while `writeen` is set and
// the ORed cell outputs `cell_drive` otherwise. Purely combinational. The
// structure follows the chip's array; the multiplexer form is this
// version's.
module bitline_cond #(
  parameter int unsigned N = gol_pkg::BOARD_N
) (
  input  logic         writeen,
  input  logic [N-1:0] bitline_write,
  input  logic [N-1:0] cell_drive,
  output logic [N-1:0] bitline,
  output logic [N-1:0] bitline_read
);

  assign bitline      = writeen ? bitline_write : cell_drive;
  assign bitline_read = bitline;

endmodule
