// mag_comp2: low-power 2-bit magnitude comparator.
//
// Compares two unsigned 2-bit numbers A and B and raises exactly one of three
// outputs: F1 (A<B), F2 (A=B) or F3 (A>B). The idea is to avoid the usual
// three priority equations. F1 is chosen from a handful of simple functions
// of B by the value of A (f1_less); F2 is A1 XNOR B1 gated by A0 = B0
// (f2_equal); F3 is not computed at all but taken as NOR(F1, F2)
// (f3_greater). In the transistor realisation the selection stages are
// transmission-gate pairs, which is why the circuit needs few devices.
//
// Interface: a[1:0], b[1:0] in; f1_lt, f2_eq, f3_gt out, one-hot.
// Timing: purely combinational; no clock or reset. The critical path is
// F1 or F2 followed by the NOR that forms F3.
module mag_comp2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       f1_lt,
  output logic       f2_eq,
  output logic       f3_gt
);
  f1_less    u_f1 (.a(a), .b(b), .f1(f1_lt));
  f2_equal   u_f2 (.a(a), .b(b), .f2(f2_eq));
  f3_greater u_f3 (.f1(f1_lt), .f2(f2_eq), .f3(f3_gt));

  // The three outputs are mutually exclusive and one of them always holds.
  always_comb begin
    assert final ($onehot({f1_lt, f2_eq, f3_gt}))
      else $error("comparator outputs not one-hot: lt=%b eq=%b gt=%b", f1_lt, f2_eq, f3_gt);
  end
endmodule
