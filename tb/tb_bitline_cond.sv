// tb_bitline_cond: random write data and cell drive, both enable values.
// With writeen the bitline (and the read output) must carry the write data,
// without it the value driven by the cells.
module tb_bitline_cond;
  localparam int N = 8;
  logic writeen;
  logic [N-1:0] bitline_write, cell_drive, bitline, bitline_read;
  int checks = 0, failures = 0;

  bitline_cond #(.N(N)) dut (.writeen(writeen), .bitline_write(bitline_write), .cell_drive(cell_drive),
                             .bitline(bitline), .bitline_read(bitline_read));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] expected;
      writeen       = 1'($urandom);
      bitline_write = N'($urandom);
      cell_drive    = N'($urandom);
      #1;
      expected = writeen ? bitline_write : cell_drive;
      checks++;
      if (bitline !== expected || bitline_read !== expected) begin
        failures++;
        $display("FAIL we=%b w=%b c=%b: bl=%b rd=%b", writeen, bitline_write, cell_drive, bitline, bitline_read);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
