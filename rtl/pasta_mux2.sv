// pasta_mux2: 2:1 multiplexer used twice in every bit slice of the parallel
// self-timed adder.
//
// OUT follows D0 while SEL is 0 and D1 while SEL is 1. In the adder, D0 is
// an operand bit and D1 the fed-back sum or incoming carry, and SEL is the
// request line of the adder. The intended circuit is two transmission gates
// with an inverter for the complement select (6 transistors); the generic
// enable input of a catalogue multiplexer is not used by the design and is
// left out.
//
// Interface: d0, d1, sel in; out out. Purely combinational, no clock.
module pasta_mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic out
);

  always_comb out = sel ? d1 : d0;

endmodule
