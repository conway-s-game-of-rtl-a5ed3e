// tb_outputlogic: exhaustive test of the Life rule.
// All 512 combinations of cell and neighbours are applied; the expected
// next value is worked out from the rules (survive with 2 or 3 live
// neighbours, birth with exactly 3) by counting bits in the testbench.
module tb_outputlogic;
  logic       cellbit;
  logic [7:0] eightbits;
  logic       newcellvalue;
  int checks = 0, failures = 0;

  outputlogic dut (.cellbit(cellbit), .eightbits(eightbits), .newcellvalue(newcellvalue));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int live;
      logic expected;
      {cellbit, eightbits} = 9'(v);
      #1;
      live = $countones(eightbits);
      if (cellbit) expected = (live == 2 || live == 3);
      else         expected = (live == 3);
      checks++;
      if (newcellvalue !== expected) begin
        failures++;
        $display("FAIL cell=%b neighbours=%b got %b expected %b", cellbit, eightbits, newcellvalue, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
