// f3_greater_tb: self-check of the A>B output stage.
//
// Drives all four combinations of the A<B and A=B inputs and checks the
// NOR. Then drives the stage from operand pairs the way the full comparator
// does (f1 = a<b, f2 = a==b, computed here) and checks f3 against a>b.
// A watchdog ends a hung run with a failure.
module f3_greater_tb;
  logic f1, f2, f3;
  int checks = 0, failures = 0;

  f3_greater dut (.f1(f1), .f2(f2), .f3(f3));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {f1, f2} = 2'(i);
      #1;
      checks++;
      if (f3 !== (i == 0)) begin
        failures++;
        $display("FAIL f1=%b f2=%b f3=%b", f1, f2, f3);
      end
    end
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        f1 = (a < b);
        f2 = (a == b);
        #1;
        checks++;
        if (f3 !== (a > b)) begin
          failures++;
          $display("FAIL a=%0d b=%0d f3=%b", a, b, f3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
