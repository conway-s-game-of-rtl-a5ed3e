// sram12t_cell: one storage bit of the board register.
//
// The chip builds this bit as a twelve-transistor cell: a transmission gate
// opened by write/write_b loads the bitline into a cross-coupled inverter
// pair, and a tristate inverter opened by read/read_b drives the stored
// value back onto the same bitline. Here the storage is a flip-flop that
// loads `bit_in` at the clock edge of a cycle with `write` set, and the
// tristate driver is an AND gate: `bit_out` is the stored value while `read`
// is set and zero otherwise, so the outputs of one column can be ORed into
// the shared bitline. The complementary strobes of the transistor cell are
// not needed in this form. The cell has no reset; the controller clears the
// board by writing zeros. Write data is visible on `bit_out` from the cycle
// after the write.
module sram12t_cell (
  input  logic clk,
  input  logic write,
  input  logic read,
  input  logic bit_in,
  output logic bit_out
);

  logic stored;

  always_ff @(posedge clk)
    if (write) stored <= bit_in;

  assign bit_out = read & stored;

endmodule
