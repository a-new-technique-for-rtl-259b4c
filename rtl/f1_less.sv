// f1_less: the "A less than B" output (F1) of the 2-bit magnitude comparator.
//
// Instead of the classic priority equation A<B = A1'B1 + X1 A0'B0, the value of
// A selects which simple function of B is the answer:
//   A = 00 -> F1 = B1 + B0      (any nonzero B is larger)
//   A = 01 -> F1 = B1           (B must be 10 or 11)
//   A = 10 -> F1 = B1 . B0      (B must be 11)
//   A = 11 -> F1 = 0            (nothing is larger)
// Only one OR and one AND of the B bits are needed; the rest is selection.
// The selection is a two-level tree: a first level steered by A0 picks the
// candidate for each value of A1, and a last level steered by A1 picks F1.
// This ordering (A0 first, A1 at the output) follows the labels of the
// selection stages on the F1 side of the published schematic.
//
// Interface: a[1:0], b[1:0] in; f1 out (1 when a < b, unsigned).
// Timing: purely combinational, no clock.
module f1_less (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       f1
);
  logic b_or;    // B1 + B0
  logic b_and;   // B1 . B0
  logic sel_a1_0; // candidate when A1 = 0
  logic sel_a1_1; // candidate when A1 = 1

  always_comb begin
    b_or  = b[1] | b[0];
    b_and = b[1] & b[0];
  end

  // A0 level: A=00 -> B1+B0, A=01 -> B1
  tg_mux2 u_a0_low  (.sel(a[0]), .d0(b_or),  .d1(b[1]), .y(sel_a1_0));
  // A0 level: A=10 -> B1.B0, A=11 -> 0
  tg_mux2 u_a0_high (.sel(a[0]), .d0(b_and), .d1(1'b0), .y(sel_a1_1));
  // A1 level: output
  tg_mux2 u_a1      (.sel(a[1]), .d0(sel_a1_0), .d1(sel_a1_1), .y(f1));
endmodule
