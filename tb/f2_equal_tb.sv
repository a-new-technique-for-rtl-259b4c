// f2_equal_tb: exhaustive self-check of the A=B output.
//
// Applies all 16 pairs of 2-bit operands and compares f2 with an integer
// equality worked out in the testbench, and with the F2 truth-table column
// written as a constant (bit i is the row with {A1,A0,B1,B0} = i). It also
// counts how often each of the two cases of the design (low bits equal, low
// bits different) was exercised. A watchdog ends a hung run with a failure.
module f2_equal_tb;
  localparam logic [15:0] F2_TABLE = 16'b1000_0100_0010_0001;

  logic [1:0] a, b;
  logic       f2;
  int checks = 0, failures = 0;
  int low_same = 0, low_diff = 0;

  f2_equal dut (.a(a), .b(b), .f2(f2));

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
      if (a[0] == b[0]) low_same++; else low_diff++;
      checks++;
      if (f2 !== (a == b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d f2=%b", a, b, f2);
      end
      checks++;
      if (f2 !== F2_TABLE[i]) begin
        failures++;
        $display("FAIL table row %0d f2=%b expected %b", i, f2, F2_TABLE[i]);
      end
    end
    checks++;
    if (low_same != 8 || low_diff != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
