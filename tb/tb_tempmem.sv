// tb_tempmem: random new-cell bits shifted in under a random enable.
// The testbench keeps the 16 most recent accepted bits as a list and checks
// both the older-row output (finalrow low) and the newer-row output
// (finalrow high) after every clock edge.
module tb_tempmem;
  localparam int N = 8;
  logic clk = 0, rst, newbiten, finalrow, q;
  logic [N-1:0] row2;
  bit hist [$];
  int checks = 0, failures = 0;

  tempmem #(.N(N)) dut (.clk(clk), .rst(rst), .newbiten(newbiten), .finalrow(finalrow), .q(q), .row2(row2));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] expected_row(bit newest);
    logic [N-1:0] r = '0;
    // hist[0] is the newest bit; the newer row is bits 0..N-1, oldest in the MSB
    for (int i = 0; i < N; i++) begin
      int k = newest ? i : i + N;
      r[i] = (k < hist.size()) ? hist[k] : 1'b0;
    end
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; newbiten = 0; finalrow = 0; q = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      newbiten = ($urandom % 4) != 0;
      q        = 1'($urandom);
      @(posedge clk);
      if (newbiten) hist.push_front(q);
      #1;
      for (int f = 0; f < 2; f++) begin
        finalrow = f[0];
        #1;
        checks++;
        if (row2 !== expected_row(f[0])) begin
          failures++;
          $display("FAIL t=%0d finalrow=%0d got %b expected %b", t, f, row2, expected_row(f[0]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
