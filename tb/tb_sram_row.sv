// tb_sram_row: random writes and reads of one register row.
// The testbench keeps its own copy of the row: after a write cycle the row
// must hold the written bits, a read must return them, and with `read`
// low the outputs must be zero.
module tb_sram_row;
  localparam int N = 8;
  logic clk = 0, write, read;
  logic [N-1:0] bit_in, bit_out, stored;
  int checks = 0, failures = 0;

  sram_row #(.N(N)) dut (.clk(clk), .write(write), .read(read), .bit_in(bit_in), .bit_out(bit_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write = 1; read = 0; bit_in = 8'hA5;
    @(posedge clk);
    stored = 8'hA5;
    for (int t = 0; t < 1000; t++) begin
      #1;
      write  = ($urandom % 3) == 0;
      read   = 1'($urandom);
      bit_in = N'($urandom);
      #1;
      checks++;
      if (bit_out !== (read ? stored : '0)) begin
        failures++;
        $display("FAIL t=%0d read=%b got %b stored %b", t, read, bit_out, stored);
      end
      @(posedge clk);
      if (write) stored = bit_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
