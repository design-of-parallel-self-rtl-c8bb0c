// pasta_half_adder: single-bit half adder, the arithmetic element of every
// bit slice of the parallel self-timed adder.
//
// SUM is the exclusive OR of the two inputs and CARRY their AND, as in the
// usual half-adder truth table. The circuit realisation intended for the
// design is a six-transistor transmission-gate XOR for the sum and a NAND
// followed by an inverter for the carry (12 transistors in all); at the
// logic level that is exactly the function below.
//
// Interface: a, b in; sum, carry out. Purely combinational, no clock.
module pasta_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
