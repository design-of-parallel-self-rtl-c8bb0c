// pasta_completion_detect: completion detection unit of the parallel
// self-timed adder.
//
// The adder is finished when, in the iterative phase (SEL = 1), every carry
// held by the bit slices has settled at zero. The unit is a wide NOR of the
// carries, enabled by SEL: the negated detection gives the active-high TERM.
// While SEL is 0 (operands being loaded) TERM is held low whatever the
// carries are. The number of carries watched is a parameter; the adder
// passes in all of its internal carries, including the carry-in slot.
//
// Interface: sel, carry[N_CARRY-1:0] in; term out. Purely combinational.
module pasta_completion_detect #(
  parameter int unsigned N_CARRY = 6
) (
  input  logic               sel,
  input  logic [N_CARRY-1:0] carry,
  output logic               term
);

  always_comb term = sel & ~(|carry);

endmodule
