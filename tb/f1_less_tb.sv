// f1_less_tb: exhaustive self-check of the A<B output.
//
// Applies all 16 pairs of 2-bit operands and compares f1 with an unsigned
// integer comparison worked out in the testbench, then checks again against
// the 16-entry truth table of F1 written as a constant (bit i is the row with
// {A1,A0,B1,B0} = i). A watchdog ends the run with a failure if it hangs.
module f1_less_tb;
  // F1 column of the truth table, row {A1,A0,B1,B0} = i at bit i
  localparam logic [15:0] F1_TABLE = 16'b0000_1000_1100_1110;

  logic [1:0] a, b;
  logic       f1;
  int checks = 0, failures = 0;

  f1_less dut (.a(a), .b(b), .f1(f1));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (f1 !== (int'(a) < int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d f1=%b", a, b, f1);
      end
      checks++;
      if (f1 !== F1_TABLE[i]) begin
        failures++;
        $display("FAIL table row %0d f1=%b expected %b", i, f1, F1_TABLE[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
