// tb_gol_register: random row writes and reads of the 8 x 8 register.
// Every row is first written with a known value; then random cycles write
// a random row, read a random row or do neither, and each read is compared
// with the testbench's own copy of the board. Reads are combinational;
// writes take effect at the clock edge.
module tb_gol_register;
  localparam int N = 8;
  logic clk = 0, writeen, readen;
  logic [N-1:0] wordline, bitline_write, bitline_read;
  logic [N-1:0] board [N];
  int checks = 0, failures = 0;

  gol_register #(.N(N)) dut (.clk(clk), .writeen(writeen), .readen(readen), .wordline(wordline),
                             .bitline_write(bitline_write), .bitline_read(bitline_read));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    writeen = 0; readen = 0; wordline = 0; bitline_write = 0;
    for (int r = 0; r < N; r++) begin
      #1 writeen = 1; wordline = N'(1) << r; bitline_write = N'($urandom);
      board[r] = bitline_write;
      @(posedge clk);
    end
    for (int t = 0; t < 2000; t++) begin
      int r, op;
      #1;
      r  = $urandom % N;
      op = $urandom % 3;
      writeen = (op == 0);
      readen  = (op == 1);
      wordline = N'(1) << r;
      bitline_write = N'($urandom);
      #1;
      checks++;
      if (bitline_read !== (readen ? board[r] : (writeen ? bitline_write : '0))) begin
        failures++;
        $display("FAIL t=%0d op=%0d row=%0d got %b expected %b", t, op, r, bitline_read, board[r]);
      end
      @(posedge clk);
      if (writeen) board[r] = bitline_write;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
