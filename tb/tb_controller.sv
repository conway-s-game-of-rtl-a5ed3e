// tb_controller: test of the controller's access sequence on its own.
//
// A behavioural board register answers the controller's reads, and the
// write-back data input `row2` is driven with a new random value every
// cycle, so each write-back can be matched to the cycle it happened in.
// Sampling every cycle in mid-cycle, the testbench checks:
//  * after reset, N consecutive writes of zero, top row first;
//  * during the display scan, that the LED load values are the row being
//    read and its one-hot row select, 15 load cycles per row, top to bottom;
//  * that the k-th enter press writes the switches into row k;
//  * for a generation, that the reads follow the expected order (each row
//    top to bottom, each column left to right, row above / row / row below,
//    with `zerorow` exactly for rows outside the board), that each read
//    selects the right column, that `newbiten` follows every third read,
//    that the write-backs go to rows 0..N-1 in order carrying `row2` with
//    `finalrow` only on the last, and that the generation takes 207 cycles.
module tb_controller;
  import gol_pkg::*;

  localparam int N = BOARD_N;

  logic clk = 0, rst, enter;
  logic [N-1:0] switches, bitline_read, row2;
  logic finalrow, leden, write_en, read_en, zerorow, threebitshift, newbiten;
  logic [N-1:0] nledpower, nledcolumn, wordline, bitline_write, column;
  logic [N-1:0] mem [N];
  int checks = 0, failures = 0;

  controller dut (.clk(clk), .rst(rst), .enter(enter), .switches(switches), .bitline_read(bitline_read),
                  .row2(row2), .finalrow(finalrow), .leden(leden), .nledpower(nledpower),
                  .nledcolumn(nledcolumn), .write_en(write_en), .read_en(read_en), .wordline(wordline),
                  .bitline_write(bitline_write), .column(column), .zerorow(zerorow),
                  .threebitshift(threebitshift), .newbiten(newbiten));

  always #5 clk = ~clk;

  always_comb begin
    bitline_read = '0;
    if (read_en)
      for (int i = 0; i < N; i++) if (wordline[i]) bitline_read |= mem[i];
  end
  always @(posedge clk) begin
    if (write_en)
      for (int i = 0; i < N; i++) if (wordline[i]) mem[i] <= bitline_write;
    #1 row2 <= N'($urandom);
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic logic [N-1:0] row_sel(int r);   // row 0 = top = bit N-1
    return N'(1) << (N - 1 - r);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the access record of one cycle
  typedef struct {
    logic         rd, wr, shift, newbit, fin;
    logic [N-1:0] wl, col, data, r2;
    logic         zr;
  } acc_t;

  task automatic sample(output acc_t a);
    @(negedge clk);
    a.rd = read_en; a.wr = write_en; a.shift = threebitshift; a.newbit = newbiten;
    a.fin = finalrow; a.wl = wordline; a.col = column; a.data = bitline_write;
    a.r2 = row2; a.zr = zerorow;
  endtask

  task automatic press(logic [N-1:0] sw);
    @(posedge clk);
    #2 switches = sw; enter = 1;
    @(posedge clk);
    #2 enter = 0;
  endtask

  initial begin
    acc_t a;
    logic [N-1:0] board [N];
    rst = 1; enter = 0; switches = '0;
    repeat (3) @(posedge clk);
    #2 rst = 0;

    // memory clear: skip the reset cycle, then N zero writes top to bottom
    sample(a);
    check(!a.wr, "no write in the reset state");
    for (int r = 0; r < N; r++) begin
      sample(a);
      check(a.wr && a.wl == row_sel(r) && a.data == '0, $sformatf("clear write %0d: wr=%b wl=%b data=%b", r, a.wr, a.wl, a.data));
    end

    // first display scan: 15 load cycles per row, rows top to bottom
    for (int r = 0; r < N; r++) begin
      for (int k = 0; k < 15; k++) begin
        sample(a);
        check(a.rd && leden && a.wl == row_sel(r) && nledpower == row_sel(r) && nledcolumn == mem[N - 1 - r],
              $sformatf("display row %0d cycle %0d: rd=%b leden=%b wl=%b", r, k, a.rd, leden, a.wl));
      end
      sample(a);
      check(!a.rd && !leden, $sformatf("display row %0d gap cycle", r));
    end

    // enter the board: press k writes row k
    for (int r = 0; r < N; r++) begin
      logic [N-1:0] v;
      int waited;
      v = N'($urandom);
      waited = 0;
      board[r] = v;
      press(v);
      do begin sample(a); waited++; end while (!a.wr && waited < 400);
      check(a.wr && a.wl == row_sel(r) && a.data == v, $sformatf("input row %0d: wl=%b data=%b expected %b", r, a.wl, a.data, v));
      check(!a.rd, "no read during an input write");
    end
    // the register now holds the board
    @(posedge clk);
    #1;
    for (int r = 0; r < N; r++) check(mem[N - 1 - r] == board[r], $sformatf("row %0d stored", r));

    // a generation
    begin
      acc_t reads [$];
      automatic int newbits = 0, stores = 0, cycles = 0, waited = 0;
      automatic int nr = 0;
      automatic bit prev_third = 0;
      press('0);
      do begin sample(a); waited++; end while (!a.shift && waited < 400);
      while (1) begin
        cycles++;
        check(a.newbit == prev_third, $sformatf("newbiten in cycle %0d of the generation", cycles));
        prev_third = 0;
        if (a.newbit) newbits++;
        if (a.shift) begin
          check(a.rd && !a.wr, "a calculation cycle reads");
          reads.push_back(a);
          prev_third = (reads.size() % 3 == 0) && (reads.size() <= 3 * N * N);
        end
        if (a.wr) begin
          // the read issued in the cycle before a write-back is not used
          if (!(stores > 0 && a.fin)) void'(reads.pop_back());
          check(a.wl == row_sel(stores) && a.data == a.r2,
                $sformatf("write-back %0d: wl=%b data=%b row2=%b", stores, a.wl, a.data, a.r2));
          check(a.fin == (stores == N - 1), $sformatf("finalrow on write-back %0d", stores));
          stores++;
        end
        if (stores == N) break;
        sample(a);
        if (cycles > 400) break;
      end
      check(stores == N, $sformatf("%0d write-backs, expected %0d", stores, N));
      check(newbits == N * N, $sformatf("%0d new cell values, expected %0d", newbits, N * N));
      check(cycles == 207, $sformatf("generation took %0d cycles until the last write-back, expected 207", cycles));
      sample(a);
      check(!a.shift && !a.wr && a.rd && leden, "display scan resumes after the generation");
      check(reads.size() == 3 * N * N, $sformatf("%0d reads used, expected %0d", reads.size(), 3 * N * N));
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          for (int k = -1; k <= 1; k++) begin
            int rr;
            acc_t e;
            logic [N-1:0] ewl;
            logic ezr;
            rr  = r + k;
            e   = reads[nr];
            ewl = row_sel((rr + N) % N);
            ezr = (rr < 0 || rr >= N);
            nr++;
            check(e.col == (N'(1) << (N - 1 - c)) && e.zr == ezr && (ezr || e.wl == ewl),
                  $sformatf("read r=%0d c=%0d k=%0d: wl=%b col=%b zr=%b", r, c, k, e.wl, e.col, e.zr));
          end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
