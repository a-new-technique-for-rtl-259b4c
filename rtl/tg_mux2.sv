// tg_mux2: one 2:1 selection stage of the comparator.
//
// In the transistor circuit, two transmission gates share an output node and
// take complementary control signals, so exactly one of them conducts at a
// time. Logically that is a 2:1 multiplexer: y follows d1 while sel is 1 and
// d0 while sel is 0. Both comparator functions (A<B and A=B) are built as
// trees of these stages, steered by operand bits.
//
// Interface: sel, d0, d1 in; y out. Purely combinational, no clock.
// Modelling a transmission-gate pair as a 2:1 multiplexer is this design's
// own reading of the circuit; the threshold loss of the real pass devices has
// no counterpart in a logic model.
module tg_mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);
  always_comb begin
    if (sel) y = d1;
    else     y = d0;
  end
endmodule
