// f3_greater: the "A greater than B" output (F3) of the 2-bit magnitude
// comparator.
//
// Exactly one of A<B, A=B and A>B holds, so A>B needs no comparison of its
// own: it is the NOR of the other two outputs, F3 = ~(F1 | F2). This reuse is
// the source of much of the proposed circuit's saving over a comparator that
// evaluates all three functions separately.
//
// Interface: f1 (A<B) and f2 (A=B) in; f3 out (A>B).
// Timing: purely combinational; F3 settles one gate after the later of F1, F2.
module f3_greater (
  input  logic f1,
  input  logic f2,
  output logic f3
);
  always_comb f3 = ~(f1 | f2);
endmodule
