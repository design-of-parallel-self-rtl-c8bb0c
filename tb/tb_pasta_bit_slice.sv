// tb_pasta_bit_slice: self-checking test of one adder bit slice.
// Initial phase (sel = 0): every operand pair must give the half-adder state
//   ab = 00 -> (carry,sum) 00, 01/10 -> 01, 11 -> 10.
// Iterative phase (sel = 1): from each state, one clock with incoming carry c
// must give
//   00: c=0 -> 00, c=1 -> 01;  01: c=0 -> 01, c=1 -> 10;
//   10: c=0 -> 00, c=1 -> 01.
// The slice's state is loaded through the initial phase before each step.
module tb_pasta_bit_slice;
  import pasta_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0, a = 1'b0, b = 1'b0, carry_in = 1'b0;
  logic sum, carry_out;
  int checks = 0, failures = 0;

  pasta_bit_slice dut (
    .clk(clk), .rst_n(rst_n), .sel(sel), .a(a), .b(b),
    .carry_in(carry_in), .sum(sum), .carry_out(carry_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input slice_state_t exp, input string what);
    checks++;
    if ({carry_out, sum} !== exp) begin
      failures++;
      $display("FAIL %s: got %0b%0b expected %02b", what, carry_out, sum, exp);
    end
  endtask

  // Load a state through the initial phase.
  task automatic load(input logic la, input logic lb);
    @(negedge clk);
    sel = 1'b0; a = la; b = lb;
    @(posedge clk);
    #1;
  endtask

  // One iteration with the given incoming carry.
  task automatic iterate(input logic c);
    @(negedge clk);
    sel = 1'b1; carry_in = c;
    // Operands change freely in the iterative phase; they must be ignored.
    a = ~a; b = ~b;
    @(posedge clk);
    #1;
  endtask

  slice_state_t init_exp [4];
  slice_state_t next_exp [3][2];

  initial begin
    init_exp = '{ST_00, ST_01, ST_01, ST_10};
    next_exp[0] = '{ST_00, ST_01};   // from 00
    next_exp[1] = '{ST_01, ST_10};   // from 01
    next_exp[2] = '{ST_00, ST_01};   // from 10

    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Initial phase, all operand pairs.
    for (int i = 0; i < 4; i++) begin
      load(i[1], i[0]);
      check(init_exp[i], $sformatf("initial a=%0d b=%0d", i[1], i[0]));
    end

    // Iterative phase: operand pairs 00, 01, 11 load states 00, 01, 10.
    for (int st = 0; st < 3; st++) begin
      for (int c = 0; c < 2; c++) begin
        case (st)
          0: load(1'b0, 1'b0);
          1: load(1'b0, 1'b1);
          default: load(1'b1, 1'b1);
        endcase
        iterate(c[0]);
        check(next_exp[st][c], $sformatf("iterate from state %0d with c=%0d", st, c));
      end
    end

    // A run of iterations: 01 with c=1 -> 10, then c=0 -> 00, then c=1 -> 01, hold.
    load(1'b1, 1'b0);
    iterate(1'b1); check(ST_10, "run step 1");
    iterate(1'b0); check(ST_00, "run step 2");
    iterate(1'b1); check(ST_01, "run step 3");
    iterate(1'b0); check(ST_01, "run step 4");

    // Synchronous reset clears the state.
    @(negedge clk) rst_n = 1'b0;
    @(posedge clk); #1;
    check(ST_00, "reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
