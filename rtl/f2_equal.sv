// f2_equal: the "A equal to B" output (F2) of the 2-bit magnitude comparator.
//
// When the low bits agree (A0 = B0), A and B are equal exactly when the high
// bits agree, so F2 = A1 XNOR B1; when the low bits differ, F2 = 0.
// The circuit forms X1 = A1 XNOR B1 once and then selects between X1 and a
// constant 0 in two levels: a level steered by B0 and a last level steered
// by A0 that drives F2:
//   A0 = 0: F2 = (B0 ? 0  : X1)
//   A0 = 1: F2 = (B0 ? X1 : 0 )
// The B0-then-A0 order follows the labels on the selection stages feeding F2
// in the published schematic.
//
// Interface: a[1:0], b[1:0] in; f2 out (1 when a == b).
// Timing: purely combinational, no clock.
module f2_equal (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       f2
);
  logic x1;       // A1 XNOR B1
  logic when_a0_0; // result if A0 = 0
  logic when_a0_1; // result if A0 = 1

  always_comb x1 = ~(a[1] ^ b[1]);

  tg_mux2 u_b0_a0lo (.sel(b[0]), .d0(x1),   .d1(1'b0), .y(when_a0_0));
  tg_mux2 u_b0_a0hi (.sel(b[0]), .d0(1'b0), .d1(x1),   .y(when_a0_1));
  tg_mux2 u_a0      (.sel(a[0]), .d0(when_a0_0), .d1(when_a0_1), .y(f2));
endmodule
