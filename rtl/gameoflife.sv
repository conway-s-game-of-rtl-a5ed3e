// gameoflife: the synthesized logic of the Game of Life chip.
//
// Everything except the board register: the controller, the datapath that
// turns 3x3 neighbourhoods into new cell values (bit selector, hold memory,
// output logic, temp memory), and the two LED output registers. The board
// register is outside and reached through `wordline`, `read_en`,
// `write_en`, `bitline_write` and `bitline_read` (combinational read, write
// at the clock edge).
//
// The LED outputs are registered: in display cycles the row being shown is
// loaded into `ledcolumn` and its one-hot row select into `ledpower`;
// otherwise both hold their value, so the last displayed row stays lit
// while a generation is being computed. ledpower[N-1] is the top row and
// ledcolumn[N-1] the left-most column. Reset clears both. The block split
// and connections follow the original design.
module gameoflife #(
  parameter int unsigned N = gol_pkg::BOARD_N
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enter,
  input  logic [N-1:0] switches,
  input  logic [N-1:0] bitline_read,
  output logic [N-1:0] ledpower,
  output logic [N-1:0] ledcolumn,
  output logic         write_en,
  output logic         read_en,
  output logic [N-1:0] wordline,
  output logic [N-1:0] bitline_write
);

  logic [N-1:0] row2, column, nledpower, nledcolumn;
  logic         finalrow, leden, zerorow, threebitshift, newbiten;
  logic [2:0]   threebits;
  logic         cellbit, newcellvalue;
  logic [7:0]   eightbits;

  controller #(.N(N)) u_controller (
    .clk           (clk),
    .rst           (rst),
    .enter         (enter),
    .switches      (switches),
    .bitline_read  (bitline_read),
    .row2          (row2),
    .finalrow      (finalrow),
    .leden         (leden),
    .nledpower     (nledpower),
    .nledcolumn    (nledcolumn),
    .write_en      (write_en),
    .read_en       (read_en),
    .wordline      (wordline),
    .bitline_write (bitline_write),
    .column        (column),
    .zerorow       (zerorow),
    .threebitshift (threebitshift),
    .newbiten      (newbiten)
  );

  bitselector #(.N(N)) u_bitselector (
    .column  (column),
    .zerorow (zerorow),
    .d       (bitline_read),
    .q       (threebits)
  );

  holdmem u_holdmem (
    .clk       (clk),
    .rst       (rst),
    .en        (threebitshift),
    .row       (threebits),
    .cellbit   (cellbit),
    .eightbits (eightbits)
  );

  outputlogic u_outputlogic (
    .cellbit      (cellbit),
    .eightbits    (eightbits),
    .newcellvalue (newcellvalue)
  );

  tempmem #(.N(N)) u_tempmem (
    .clk      (clk),
    .rst      (rst),
    .newbiten (newbiten),
    .finalrow (finalrow),
    .q        (newcellvalue),
    .row2     (row2)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ledpower  <= '0;
      ledcolumn <= '0;
    end else if (leden) begin
      ledpower  <= nledpower;
      ledcolumn <= nledcolumn;
    end
  end

endmodule
