// controller: sequencer of the Game of Life chip.
//
// One FSM (states in gol_pkg) drives the board register and the datapath:
//
//  * S_RESET, S_CLEAR: after reset, write an all-zero row to each of the N
//    rows, one per cycle, top row first.
//  * S_DISPLAY: scan the board onto the LED matrix. Each row is read and
//    latched into the LED registers for 2**DWELL_BITS-1 cycles, then one
//    cycle moves the scan pointer to the next row (top to bottom). Only at
//    the end of a full scan is a pending enter press acted on.
//  * S_INPUT: the first N presses of enter each write the switches into the
//    next board row, top row first; the N-th press sets `input_done`.
//  * S_CALC: every later press computes one new generation. For each row
//    (top to bottom) and each column (left to right) three cycles read the
//    row above, the row itself and the row below; the bit selector cuts out
//    the three-cell window (zero outside the board) and the hold memory
//    shifts it in. The cycle after the third read, the output logic's new
//    cell value is shifted into the temp memory (`newbiten`).
//  * S_STORE: a new row can only be written back once the row below it has
//    been computed, because that row still needs the old values. So after
//    each row except the top one, one S_STORE cycle writes the new values of
//    the row above it from the temp memory; after the bottom row a second
//    S_STORE cycle writes the bottom row itself (`finalrow`).
//
// A calculation takes 24 cycles for the top row, 26 for each middle row
// (24 reads, one cycle to shift in the last value, one write) and 27 for
// the bottom row: 207 cycles for the 8 x 8 board, after which the scan
// resumes.
//
// The enter button is sampled every cycle into a pending flag, which holds
// until the request is served (S_INPUT, or the first row of S_CALC) and then
// reloads from the button. All registers use a synchronous active-high reset;
// the register array itself is cleared by S_CLEAR. The state sequence,
// pointer encodings, enter handling and row/column order follow the original
// controller; the single clock and the reset of the pointers by `rst` are
// choices of this version.
//
// Ports: `wordline`, `read_en`, `write_en`, `bitline_write` and
// `bitline_read` connect to the board register (combinational read);
// `column`, `zerorow`, `threebitshift` go to the bit selector and hold
// memory, `newbiten` and `finalrow` to the temp memory, whose output
// `row2` is the write-back data. `leden`, `nledpower`, `nledcolumn` load the
// LED output registers.
module controller
  import gol_pkg::*;
#(
  parameter int unsigned N          = BOARD_N,
  parameter int unsigned DWELL_BITS = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enter,
  input  logic [N-1:0] switches,
  input  logic [N-1:0] bitline_read,
  input  logic [N-1:0] row2,
  output logic         finalrow,
  output logic         leden,
  output logic [N-1:0] nledpower,
  output logic [N-1:0] nledcolumn,
  output logic         write_en,
  output logic         read_en,
  output logic [N-1:0] wordline,
  output logic [N-1:0] bitline_write,
  output logic [N-1:0] column,
  output logic         zerorow,
  output logic         threebitshift,
  output logic         newbiten
);

  localparam logic [N-1:0] FIRST = {1'b1, {(N-1){1'b0}}};  // top row / left column

  // one-hot pointer moves: down a row or right a column, and up a row
  function automatic logic [N-1:0] next_one(logic [N-1:0] p);
    return {p[0], p[N-1:1]};
  endfunction
  function automatic logic [N-1:0] prev_one(logic [N-1:0] p);
    return {p[N-2:0], p[N-1]};
  endfunction

  ctrl_state_e          state_q, state_d;
  logic [N-1:0]         scan_q, scan_d;      // row pointer for clear and display
  logic [DWELL_BITS-1:0] dwell_q, dwell_d;   // cycles spent on the displayed row
  logic [N-1:0]         row_q, row_d;        // row being input or calculated
  logic                 row_we, row_clr;
  logic [N-1:0]         col_q, col_d;        // column being calculated
  logic                 col_we;
  logic [2:0]           phase_q, phase_d;    // 100: row above, 010: row, 001: below
  logic                 phase_we, phase_clr;

  logic enter_q;        // enter pressed and not yet served
  logic input_done_q;   // all N rows have been entered
  logic iter_done_q;    // last row of the generation has been calculated
  logic store_q, store_d;
  logic final_d;
  logic newbit_d;

  logic served, set_input_done, set_iter_done, display_loop, write_new;
  logic [N-1:0] write_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q      <= S_RESET;
      scan_q       <= FIRST;
      dwell_q      <= '0;
      col_q        <= FIRST;
      enter_q      <= 1'b0;
      input_done_q <= 1'b0;
      iter_done_q  <= 1'b0;
      store_q      <= 1'b0;
      finalrow     <= 1'b0;
      newbiten     <= 1'b0;
    end else begin
      state_q  <= state_d;
      scan_q   <= scan_d;
      dwell_q  <= dwell_d;
      if (col_we) col_q <= col_d;
      if (!enter_q || served) enter_q <= enter;
      if (set_input_done) input_done_q <= 1'b1;
      if (!iter_done_q || display_loop) iter_done_q <= set_iter_done;
      store_q  <= store_d;
      finalrow <= final_d;
      newbiten <= newbit_d;
    end
  end

  // row and phase pointers are also reset by the FSM itself
  always_ff @(posedge clk) begin
    if (rst || row_clr) row_q <= FIRST;
    else if (row_we)    row_q <= row_d;
  end

  always_ff @(posedge clk) begin
    if (rst || phase_clr) phase_q <= 3'b100;
    else if (phase_we)    phase_q <= phase_d;
  end

  always_comb begin
    state_d        = state_q;
    scan_d         = scan_q;
    dwell_d        = dwell_q;
    row_d          = row_q;
    row_we         = 1'b0;
    row_clr        = 1'b0;
    col_d          = col_q;
    col_we         = 1'b0;
    phase_d        = phase_q;
    phase_we       = 1'b0;
    phase_clr      = 1'b0;
    store_d        = 1'b0;
    final_d        = 1'b0;
    newbit_d       = 1'b0;
    served         = 1'b0;
    set_input_done = 1'b0;
    set_iter_done  = 1'b0;
    display_loop   = 1'b0;
    write_new      = 1'b0;
    write_data     = '0;
    write_en       = 1'b0;
    read_en        = 1'b0;
    wordline       = '0;
    leden          = 1'b0;
    nledpower      = '0;
    nledcolumn     = '0;
    column         = '0;
    zerorow        = 1'b0;
    threebitshift  = 1'b0;

    unique case (state_q)
      S_RESET: begin
        row_clr   = 1'b1;
        phase_clr = 1'b1;
        state_d   = S_CLEAR;
      end

      S_CLEAR: begin
        wordline = scan_q;
        write_en = 1'b1;
        scan_d   = next_one(scan_q);
        if (scan_q[0]) state_d = S_DISPLAY;
      end

      S_DISPLAY: begin
        dwell_d = dwell_q + 1'b1;
        if (&dwell_q) begin
          scan_d       = next_one(scan_q);
          display_loop = scan_q[0];
        end else begin
          wordline   = scan_q;
          read_en    = 1'b1;
          leden      = 1'b1;
          nledcolumn = bitline_read;
          nledpower  = scan_q;
        end
        if (display_loop && enter_q)
          state_d = input_done_q ? S_CALC : S_INPUT;
      end

      S_INPUT: begin
        served         = 1'b1;
        set_input_done = row_q[0];
        wordline       = row_q;
        write_en       = 1'b1;
        write_data     = switches;
        row_we         = 1'b1;
        row_d          = next_one(row_q);
        state_d        = S_DISPLAY;
      end

      S_CALC: begin
        served        = row_q[N-1];
        phase_we      = 1'b1;
        phase_d       = {phase_q[0], phase_q[2:1]};
        column        = col_q;
        threebitshift = 1'b1;
        read_en       = 1'b1;
        zerorow       = (row_q[N-1] && phase_q[2]) || (row_q[0] && phase_q[0]);
        if (phase_q[2])      wordline = prev_one(row_q);
        else if (phase_q[1]) wordline = row_q;
        else                 wordline = next_one(row_q);
        if (phase_q[0]) begin
          newbit_d = 1'b1;
          col_we   = 1'b1;
          col_d    = next_one(col_q);
          if (col_q[0]) begin
            set_iter_done = row_q[0];
            if (row_q[N-1]) begin
              row_we = 1'b1;          // top row: nothing to write back yet
              row_d  = next_one(row_q);
            end else begin
              store_d = 1'b1;
            end
          end
        end
        if (store_q) state_d = S_STORE;
      end

      S_STORE: begin
        phase_clr = 1'b1;
        write_en  = 1'b1;
        wordline  = prev_one(row_q);
        write_new = 1'b1;
        final_d   = row_q[0];
        if (!row_q[N-1]) begin
          row_we = 1'b1;
          row_d  = next_one(row_q);
        end
        if (final_d)          state_d = S_STORE;
        else if (iter_done_q) state_d = S_DISPLAY;
        else                  state_d = S_CALC;
      end

      default: state_d = S_RESET;
    endcase
  end

  assign bitline_write = write_new ? row2 : write_data;

endmodule
