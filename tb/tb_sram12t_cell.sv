// tb_sram12t_cell: random writes and reads of one storage bit.
// The testbench remembers the last value written and checks that a read
// returns it, that an unselected cell drives zero, and that a cycle without
// write leaves the value unchanged.
module tb_sram12t_cell;
  logic clk = 0, write, read, bit_in, bit_out;
  logic stored;
  int checks = 0, failures = 0;

  sram12t_cell dut (.clk(clk), .write(write), .read(read), .bit_in(bit_in), .bit_out(bit_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // first write a known value
    write = 1; read = 0; bit_in = 1;
    @(posedge clk); stored = 1;
    for (int t = 0; t < 1000; t++) begin
      #1;
      write  = ($urandom % 3) == 0;
      read   = 1'($urandom);
      bit_in = 1'($urandom);
      #1;
      checks++;
      if (bit_out !== (read & stored)) begin
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
