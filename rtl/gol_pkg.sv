// gol_pkg: constants and types shared by the Game of Life chip.
//
// BOARD_N is the side of the square board (8 by 8 on the chip). The
// controller state encoding is one-hot-like with an all-zero reset state,
// the encoding of the original controller; each bit names one phase of
// operation (memory clear, LED display scan, user row input, neighbour
// calculation, write-back of a finished row).
package gol_pkg;

  localparam int unsigned BOARD_N = 8;

  typedef enum logic [4:0] {
    S_RESET   = 5'b00000,  // one cycle after reset: reset row/phase pointers
    S_CLEAR   = 5'b00001,  // write zeros to every row of the register
    S_DISPLAY = 5'b00010,  // scan the board onto the LED matrix, wait for enter
    S_INPUT   = 5'b00100,  // write the switch row into the next board row
    S_CALC    = 5'b01000,  // read 3x3 windows and compute new cell values
    S_STORE   = 5'b10000   // write a finished new row back into the register
  } ctrl_state_e;

endpackage
