// tb_holdmem: random windows shifted in with random enables.
// The testbench keeps the last three accepted windows itself and checks
// the cell bit and the eight neighbour bits after every clock edge.
module tb_holdmem;
  logic clk = 0, rst, en, cellbit;
  logic [2:0] row;
  logic [7:0] eightbits;
  logic [2:0] h1, h2, h3;   // newest to oldest accepted window
  int checks = 0, failures = 0;

  holdmem dut (.clk(clk), .rst(rst), .en(en), .row(row), .cellbit(cellbit), .eightbits(eightbits));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; row = 0;
    h1 = 0; h2 = 0; h3 = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      en  = ($urandom % 3) != 0;
      row = 3'($urandom);
      @(posedge clk);
      if (en) begin h3 = h2; h2 = h1; h1 = row; end
      #1;
      checks++;
      if (cellbit !== h2[1] || eightbits !== {h1, h2[2], h2[0], h3}) begin
        failures++;
        $display("FAIL t=%0d cell=%b eight=%b expected %b %b", t, cellbit, eightbits, h2[1], {h1, h2[2], h2[0], h3});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
