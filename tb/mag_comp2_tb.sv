// mag_comp2_tb: end-to-end self-check of the 2-bit magnitude comparator.
//
// Sweeps all 16 operand pairs, in order and then in a pseudo-random order of
// 200 further vectors, and checks each output against an integer comparison
// made in the testbench and against the full truth table (columns F1, F2, F3
// written as constants, bit i = row {A1,A0,B1,B0} = i). It also checks that
// exactly one output is high. It counts how often each mechanism of the
// design was used: each of the four A-selected cases of F1 (B1+B0, B1,
// B1.B0, constant 0), both cases of F2 (low bits equal or different) and F3
// formed by the NOR; a mechanism never used counts as a failure.
// The comparator has no parameters, so this run is also the full-size one.
module mag_comp2_tb;
  localparam logic [15:0] F1_TABLE = 16'b0000_1000_1100_1110;
  localparam logic [15:0] F2_TABLE = 16'b1000_0100_0010_0001;
  localparam logic [15:0] F3_TABLE = 16'b0111_0011_0001_0000;

  logic [1:0] a, b;
  logic       f1_lt, f2_eq, f3_gt;
  int checks = 0, failures = 0;
  int f1_case [4];
  int f2_low_same = 0, f2_low_diff = 0, f3_high = 0;

  mag_comp2 dut (.a(a), .b(b), .f1_lt(f1_lt), .f2_eq(f2_eq), .f3_gt(f3_gt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [3:0] v);
    {a, b} = v;
    #1;
    f1_case[a]++;
    if (a[0] == b[0]) f2_low_same++; else f2_low_diff++;
    if (f3_gt) f3_high++;
    checks++;
    if ({f1_lt, f2_eq, f3_gt} !== {int'(a) < int'(b), a == b, int'(a) > int'(b)}) begin
      failures++;
      $display("FAIL a=%0d b=%0d lt=%b eq=%b gt=%b", a, b, f1_lt, f2_eq, f3_gt);
    end
    checks++;
    if ({f1_lt, f2_eq, f3_gt} !== {F1_TABLE[v], F2_TABLE[v], F3_TABLE[v]}) begin
      failures++;
      $display("FAIL table row %0d lt=%b eq=%b gt=%b", v, f1_lt, f2_eq, f3_gt);
    end
    checks++;
    if (!$onehot({f1_lt, f2_eq, f3_gt})) begin
      failures++;
      $display("FAIL outputs not one-hot for row %0d", v);
    end
  endtask

  initial begin
    foreach (f1_case[k]) f1_case[k] = 0;
    for (int i = 0; i < 16; i++) check_one(4'(i));
    for (int i = 0; i < 200; i++) check_one(4'($urandom));
    foreach (f1_case[k]) begin
      checks++;
      if (f1_case[k] == 0) begin
        failures++;
        $display("FAIL F1 case A=%0d never exercised", k);
      end
    end
    checks++;
    if (f2_low_same == 0 || f2_low_diff == 0 || f3_high == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("F1 cases A=00:%0d A=01:%0d A=10:%0d A=11:%0d; F2 low bits same:%0d diff:%0d; F3 high:%0d",
             f1_case[0], f1_case[1], f1_case[2], f1_case[3], f2_low_same, f2_low_diff, f3_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
