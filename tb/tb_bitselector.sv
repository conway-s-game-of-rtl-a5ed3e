// tb_bitselector: every column of random rows, with and without zerorow.
// The expected window is built cell by cell from the row: left neighbour,
// cell, right neighbour, dead past either edge, all dead with zerorow.
module tb_bitselector;
  localparam int N = 8;
  logic [N-1:0] column, d;
  logic         zerorow;
  logic [2:0]   q;
  int checks = 0, failures = 0;

  bitselector #(.N(N)) dut (.column(column), .zerorow(zerorow), .d(d), .q(q));

  function automatic logic cell_at(logic [N-1:0] row, int i);
    return (i < 0 || i >= N) ? 1'b0 : row[i];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      d = N'($urandom);
      if (t == 0) d = '1;
      for (int i = 0; i < N; i++) begin
        for (int z = 0; z < 2; z++) begin
          logic [2:0] expected;
          column  = N'(1) << i;
          zerorow = z[0];
          #1;
          expected = (z != 0) ? 3'b000 : {cell_at(d, i + 1), cell_at(d, i), cell_at(d, i - 1)};
          checks++;
          if (q !== expected) begin
            failures++;
            $display("FAIL d=%b col=%0d zerorow=%b got %b expected %b", d, i, zerorow, q, expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
