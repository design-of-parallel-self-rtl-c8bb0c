// pasta: parallel self-timed adder (PASTA), WIDTH bits, top of the design.
//
// The adder is a row of WIDTH+1 identical bit slices (pasta_bit_slice), each
// a half adder behind two 2:1 multiplexers, plus a completion detection unit.
// One request line, SEL, steers all multiplexers:
//   * SEL = 0, initial phase: every slice half-adds its operand bits, giving
//     sums S[i] = a[i]^b[i] and carries C[i+1] = a[i]&b[i]. The carry-in cin
//     is held in the carry slot C[0] below slice 0.
//   * SEL = 1, iterative phase: every slice half-adds its own sum and the
//     carry from the slice below, S[i] <= S[i]^C[i], C[i+1] <= S[i]&C[i],
//     and C[0] becomes 0 once cin has been taken in. The value
//     sum(S)+sum(C) (bit-weighted) never changes, each carry only travels
//     along its own run of ones, and independent runs settle in parallel.
//   * When every carry is zero, S holds a + b + cin and the completion
//     detection unit raises TERM.
// The top slice (index WIDTH) has both operands tied to 0; its sum bit is
// the carry-out. Its own carry C[WIDTH+1] can never become 1, but it is
// still watched by the completion detection, as in the slice row it extends.
//
// Synchronous realisation (choice of this implementation): the self-timed
// loop through each half adder is cut by a state register, so one rising edge
// of clk is one iteration. The number of iterations depends on the operands:
// zero when no carry is produced, at most WIDTH+1.
//
// Handshake: drive a, b, cin with SEL = 0 for at least one clock edge, then
// raise SEL and hold it. TERM (combinational from the registers) rises after
// as many edges as the addition needs and stays high while SEL stays high;
// sum and cout are then valid and stable. Lower SEL to start the next
// operation (TERM drops at once). rst_n is an active-low synchronous reset.
module pasta
  import pasta_pkg::*;
#(
  parameter int unsigned WIDTH = PASTA_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             term
);

  // carry[i] is C[i], the carry into slice i; carry[WIDTH+1] leaves the top slice.
  logic [WIDTH+1:0] carry;
  logic [WIDTH:0]   s;
  logic [WIDTH:0]   a_ext, b_ext;

  assign a_ext = {1'b0, a};
  assign b_ext = {1'b0, b};

  // Carry-in slot: loaded with cin in the initial phase, consumed by the
  // first iteration.
  always_ff @(posedge clk) begin
    if (!rst_n) carry[0] <= 1'b0;
    else        carry[0] <= sel ? 1'b0 : cin;
  end

  for (genvar i = 0; i <= WIDTH; i++) begin : g_slice
    pasta_bit_slice u_slice (
      .clk       (clk),
      .rst_n     (rst_n),
      .sel       (sel),
      .a         (a_ext[i]),
      .b         (b_ext[i]),
      .carry_in  (carry[i]),
      .sum       (s[i]),
      .carry_out (carry[i+1])
    );
  end

  pasta_completion_detect #(
    .N_CARRY (WIDTH + 2)
  ) u_cd (
    .sel   (sel),
    .carry (carry),
    .term  (term)
  );

  assign sum  = s[WIDTH-1:0];
  assign cout = s[WIDTH];

  // Once complete, the result holds for as long as SEL stays high.
  a_term_holds : assert property (@(posedge clk) disable iff (!rst_n)
    (sel && term) |=> (!sel || (term && $stable(s))))
    else $error("TERM fell or the sum changed while SEL stayed high");

  // The top slice never produces a carry: a + b + cin fits in WIDTH+1 bits.
  a_no_top_carry : assert property (@(posedge clk) disable iff (!rst_n)
    !carry[WIDTH+1])
    else $error("carry out of the top slice");

endmodule
