// pasta_pkg: types and constants shared by the parallel self-timed adder.
//
// Each bit slice of the adder holds a two-bit state, the pair (C[i+1], S[i]):
// the carry it sends to the next slice and its own sum bit. Because every
// slice is a half adder, the state (1,1) can never occur; the three legal
// states are 00, 01 and 10. The default width of 4 bits is the adder size
// worked out in full as the main example of the design.
package pasta_pkg;

  // Operand width of the main configuration.
  parameter int unsigned PASTA_WIDTH = 4;

  // State of one bit slice: carry towards the next slice and sum bit.
  typedef struct packed {
    logic carry;
    logic sum;
  } slice_state_t;

  // Legal slice states, named after the (carry, sum) pair.
  localparam slice_state_t ST_00 = '{carry: 1'b0, sum: 1'b0};
  localparam slice_state_t ST_01 = '{carry: 1'b0, sum: 1'b1};
  localparam slice_state_t ST_10 = '{carry: 1'b1, sum: 1'b0};

endpackage
