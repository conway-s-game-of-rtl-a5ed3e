// tb_core: end-to-end test of the Game of Life core at its default size.
//
// The testbench plays the user: it resets the chip, enters a board one row
// per enter press, then presses enter again for each new generation. It
// reads the board back the way an LED matrix sees it, recording
// `ledcolumn` for every row that `ledpower` selects over two full display
// scans, and compares the result with a Life model of its own (dead cells
// outside the board).
//
// Boards: five fixed boards run for three generations, with the expected
// third generation also given literally (all dead, alternating full rows,
// all live and two irregular boards), then random boards for several
// generations, then a reset in the middle of a calculation followed by a
// new game. After every row press the display must show the rows entered
// so far over a cleared board. Each generation must take 207 cycles from
// the start of the calculation to the return to the display scan.
//
// The testbench also counts how often each mechanism of the controller
// happens (memory clear, display scan, row input, end of input, generation,
// row write-back, final-row write-back, out-of-board row, hold of the LEDs
// during a calculation, reset during a calculation) and counts a failure
// for any that never happens.
module tb_core;
  import gol_pkg::*;

  localparam int N = BOARD_N;
  localparam int GEN_CYCLES = 207;
  typedef logic [N-1:0] board_t [N];   // index 0 = top row, bit N-1 = left column

  logic clk = 0, rst, enter;
  logic [N-1:0] switches, ledpower, ledcolumn;
  int checks = 0, failures = 0;
  longint cycle = 0;

  core dut (.clk(clk), .rst(rst), .enter(enter), .switches(switches),
            .ledpower(ledpower), .ledcolumn(ledcolumn));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanisms
  ctrl_state_e st, st_prev;
  int n_clear = 0, n_scan = 0, n_input = 0, n_input_done = 0, n_gen = 0;
  int n_store = 0, n_final_store = 0, n_zerorow = 0, n_led_hold = 0, n_reset_calc = 0;
  longint calc_start = 0;
  int gen_lat_bad = 0;

  assign st = dut.u_gameoflife.u_controller.state_q;

  always @(posedge clk) begin
    if (rst) begin
      if (st == S_CALC || st == S_STORE) n_reset_calc++;
    end else begin
      if (st == S_CLEAR && st_prev != S_CLEAR) n_clear++;
      if (dut.u_gameoflife.u_controller.display_loop) n_scan++;
      if (st == S_INPUT) n_input++;
      if (st == S_INPUT && dut.u_gameoflife.u_controller.set_input_done) n_input_done++;
      if (st == S_CALC && st_prev == S_DISPLAY) calc_start = cycle;
      if (st == S_DISPLAY && st_prev == S_STORE) begin
        n_gen++;
        checks++;
        if (cycle - calc_start != longint'(GEN_CYCLES)) begin
          failures++;
          gen_lat_bad++;
          $display("FAIL generation took %0d cycles, expected %0d", cycle - calc_start, GEN_CYCLES);
        end
      end
      if (st == S_STORE) n_store++;
      if (st == S_STORE && dut.u_gameoflife.u_controller.finalrow) n_final_store++;
      if (st == S_CALC && dut.u_gameoflife.u_controller.zerorow) n_zerorow++;
      if (st == S_CALC && ledpower != '0) n_led_hold++;
    end
    st_prev <= st;
  end

  // ------------------------------------------------------------- Life model
  function automatic board_t life_step(board_t b);
    board_t n;
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        int live = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if ((dr != 0 || dc != 0) && r + dr >= 0 && r + dr < N && c + dc >= 0 && c + dc < N)
              live += int'(b[r + dr][N - 1 - (c + dc)]);
        n[r][N - 1 - c] = (live == 3) || (live == 2 && b[r][N - 1 - c]);
      end
    end
    return n;
  endfunction

  // --------------------------------------------------------------- helpers
  task automatic do_reset();
    @(negedge clk);
    rst = 1; enter = 0;
    repeat (3) @(negedge clk);
    rst = 0;
  endtask

  task automatic press(logic [N-1:0] sw);
    @(negedge clk);
    switches = sw; enter = 1;
    @(negedge clk);
    enter = 0;
  endtask

  // read the board as the LED matrix shows it, over two display scans
  task automatic read_display(output board_t b, output int rows_seen);
    logic [N-1:0] seen = '0;
    for (int r = 0; r < N; r++) b[r] = '0;
    repeat (2 * N * 16 + 4) begin
      @(posedge clk);
      #1;
      if ($onehot(ledpower)) begin
        for (int i = 0; i < N; i++)
          if (ledpower[i]) begin
            b[N - 1 - i] = ledcolumn;
            seen[i] = 1'b1;
          end
      end
    end
    rows_seen = $countones(seen);
  endtask

  task automatic compare(string what, board_t got, board_t exp, int rows_seen);
    checks++;
    if (rows_seen != N) begin
      failures++;
      $display("FAIL %s: only %0d rows were displayed", what, rows_seen);
    end
    for (int r = 0; r < N; r++) begin
      checks++;
      if (got[r] !== exp[r]) begin
        failures++;
        $display("FAIL %s: row %0d shows %b, expected %b", what, r, got[r], exp[r]);
      end
    end
  endtask

  // enter a board row by row, checking the display after each row
  task automatic enter_board(board_t b, string name);
    board_t shown, partial;
    int seen;
    for (int r = 0; r < N; r++) partial[r] = '0;
    for (int r = 0; r < N; r++) begin
      press(b[r]);
      partial[r] = b[r];
      repeat (N * 16 + 8) @(posedge clk);
      if (r == 0 || r == N - 1) begin
        read_display(shown, seen);
        compare($sformatf("%s input row %0d", name, r), shown, partial, seen);
      end
    end
  endtask

  task automatic run_generations(board_t b, int gens, string name);
    board_t shown, exp;
    int seen;
    exp = b;
    for (int g = 1; g <= gens; g++) begin
      press('0);
      repeat (N * 16 + GEN_CYCLES + 16) @(posedge clk);
      exp = life_step(exp);
      read_display(shown, seen);
      compare($sformatf("%s generation %0d", name, g), shown, exp, seen);
    end
  endtask

  // the fixed boards and their expected third generation
  localparam int NFIX = 5;
  logic [N-1:0] fix_in  [NFIX][N] = '{
    '{8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000},
    '{8'b11111111, 8'b00000000, 8'b11111111, 8'b00000000, 8'b11111111, 8'b00000000, 8'b11111111, 8'b00000000},
    '{8'b10011101, 8'b00110000, 8'b11011111, 8'b11011011, 8'b00111100, 8'b10110110, 8'b11111111, 8'b11001001},
    '{8'b11111111, 8'b11111111, 8'b11111111, 8'b11111111, 8'b11111111, 8'b11111111, 8'b11111111, 8'b11111111},
    '{8'b11111001, 8'b10001001, 8'b11011001, 8'b11110000, 8'b01111101, 8'b00000110, 8'b01111110, 8'b10100110}
  };
  logic [N-1:0] fix_out [NFIX][N] = '{
    '{8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000},
    '{8'b00011000, 8'b00000000, 8'b00011000, 8'b00000000, 8'b00011000, 8'b00111100, 8'b00000000, 8'b00000000},
    '{8'b00100000, 8'b11000000, 8'b00000011, 8'b00100100, 8'b11000100, 8'b00000100, 8'b00000011, 8'b00000000},
    '{8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000, 8'b00000000},
    '{8'b01011010, 8'b01000001, 8'b00011001, 8'b00001010, 8'b00001000, 8'b01010111, 8'b10000011, 8'b01010000}
  };

  initial begin
    board_t b, shown;
    int seen;
    rst = 1; enter = 0; switches = '0;

    for (int t = 0; t < NFIX; t++) begin
      string name;
      name = $sformatf("fixed board %0d", t);
      do_reset();
      for (int r = 0; r < N; r++) b[r] = fix_in[t][r];
      enter_board(b, name);
      run_generations(b, 3, name);
      for (int r = 0; r < N; r++) b[r] = fix_out[t][r];
      read_display(shown, seen);
      compare({name, " literal third generation"}, shown, b, seen);
    end

    for (int t = 0; t < 6; t++) begin
      string name;
      name = $sformatf("random board %0d", t);
      do_reset();
      for (int r = 0; r < N; r++) b[r] = N'($urandom);
      enter_board(b, name);
      run_generations(b, 4, name);
    end

    // reset in the middle of a calculation, then a new game
    press('0);
    wait (st == S_CALC);
    repeat (50) @(posedge clk);
    do_reset();
    repeat (N * 16 + 20) @(posedge clk);
    for (int r = 0; r < N; r++) b[r] = '0;
    read_display(shown, seen);
    compare("board after reset during calculation", shown, b, seen);
    b = '{8'b00100000, 8'b00010000, 8'b01110000, 8'b0, 8'b0, 8'b0, 8'b0, 8'b0};  // a glider
    enter_board(b, "glider");
    run_generations(b, 8, "glider");

    // every mechanism must have happened
    begin
      int counts [10];
      string names [10];
      counts = '{n_clear, n_scan, n_input, n_input_done, n_gen, n_store, n_final_store,
                          n_zerorow, n_led_hold, n_reset_calc};
      names = '{"memory clear", "display scan", "row input", "end of input", "generation",
                            "row write-back", "final-row write-back", "out-of-board row",
                            "LED hold during calculation", "reset during calculation"};
      for (int i = 0; i < 10; i++) begin
        $display("mechanism %-28s happened %0d times", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
