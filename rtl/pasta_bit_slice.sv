// pasta_bit_slice: one bit of the parallel self-timed adder (PASTA).
//
// Two 2:1 multiplexers feed a half adder. With SEL = 0 (initial phase) they
// pass the operand bits a and b, so the slice forms a + b as a half adder:
// sum S[i] = a ^ b, carry C[i+1] = a & b. With SEL = 1 (iterative phase) they
// pass the slice's own sum S[i] and the carry C[i] arriving from the slice
// below, so each iteration computes S[i] <= S[i] ^ C[i] and
// C[i+1] <= S[i] & C[i]. Repeating this lets every carry ripple only as far
// as it has to, and bits without a carry to absorb are finished at once.
//
// In the original circuit the half-adder outputs run straight back to the
// multiplexers and the loop settles by itself. Here the loop is broken by a
// two-bit state register clocked by clk: one clock edge is one iteration.
// That register, its reset and its clock are choices of this implementation,
// made so the design is synchronous, synthesizable and free of combinational
// loops. The state (carry, sum) = (1,1) is unreachable in both phases; an
// assertion watches for it.
//
// Interface: clk, rst_n (active-low, synchronous reset of the state to 00),
// sel, operand bits a and b, carry_in = C[i] from the slice below; sum = S[i]
// and carry_out = C[i+1], both registered.
// Timing: the state takes the half-adder result on every rising edge of clk.
module pasta_bit_slice
  import pasta_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sel,
  input  logic a,
  input  logic b,
  input  logic carry_in,
  output logic sum,
  output logic carry_out
);

  slice_state_t state;
  logic ha_a, ha_b;
  logic ha_sum, ha_carry;

  // Operand side: a in the initial phase, the slice's own sum afterwards.
  pasta_mux2 u_mux_a (
    .d0  (a),
    .d1  (state.sum),
    .sel (sel),
    .out (ha_a)
  );

  // Carry side: b in the initial phase, the carry from below afterwards.
  pasta_mux2 u_mux_b (
    .d0  (b),
    .d1  (carry_in),
    .sel (sel),
    .out (ha_b)
  );

  pasta_half_adder u_ha (
    .a     (ha_a),
    .b     (ha_b),
    .sum   (ha_sum),
    .carry (ha_carry)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) state <= ST_00;
    else        state <= '{carry: ha_carry, sum: ha_sum};
  end

  assign sum       = state.sum;
  assign carry_out = state.carry;

  // A half adder never produces carry and sum together.
  a_no_state_11 : assert property (@(posedge clk) disable iff (!rst_n)
    !(state.carry && state.sum))
    else $error("bit slice reached the forbidden state (1,1)");

endmodule
