// tb_wordline_cond: all wordline patterns with each combination of enables.
// Expected strobes: read[i] = wordline[i] AND readen, write[i] likewise
// with writeen, and the _b outputs their complements.
module tb_wordline_cond;
  localparam int N = 8;
  logic [N-1:0] wordline, read, read_b, write, write_b;
  logic readen, writeen;
  int checks = 0, failures = 0;

  wordline_cond #(.N(N)) dut (.wordline(wordline), .readen(readen), .writeen(writeen),
                              .read(read), .read_b(read_b), .write(write), .write_b(write_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2 ** N; w++) begin
      for (int e = 0; e < 4; e++) begin
        logic [N-1:0] er, ew;
        wordline = N'(w);
        {readen, writeen} = 2'(e);
        #1;
        for (int i = 0; i < N; i++) begin
          er[i] = wordline[i] & readen;
          ew[i] = wordline[i] & writeen;
        end
        checks++;
        if (read !== er || write !== ew || read_b !== ~er || write_b !== ~ew) begin
          failures++;
          $display("FAIL wl=%b re=%b we=%b: %b %b %b %b", wordline, readen, writeen, read, read_b, write, write_b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
