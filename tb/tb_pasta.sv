// tb_pasta: end-to-end self-checking test of the parallel self-timed adder
// at its default width (4 bits), over every operand pair and both carry-ins.
//
// Each operation follows the adder's handshake: operands with SEL = 0 for one
// clock edge (initial phase), then SEL = 1 until TERM rises (iterative
// phase), then SEL back to 0. The test checks
//   * sum and cout against a + b + cin;
//   * the number of clock edges (iterations) before TERM against a
//     word-level model of the half-adder recursion: s = a^b, c = 2(a&b)+cin,
//     then (s, c) <- (s^c, 2(s&c)) until c = 0;
//   * TERM low throughout the initial phase, and TERM and the result held
//     for further edges while SEL stays high;
//   * operand changes during the iterative phase have no effect.
// It also counts how often each behaviour of the adder occurred and fails if
// one never did: completion with no iteration, one iteration, several
// iterations, the worst case of WIDTH+1 iterations, a consumed carry-in, a
// carry-out, several carries resolving in parallel, and TERM held low by SEL.
module tb_pasta;
  localparam int W = 4;

  logic         clk = 1'b0, rst_n = 1'b0, sel = 1'b0, cin = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [W-1:0] sum;
  logic         cout, term;
  int checks = 0, failures = 0;

  int n_zero_iter = 0, n_one_iter = 0, n_multi_iter = 0, n_worst = 0;
  int n_cin_used = 0, n_cout = 0, n_parallel = 0, n_sel_gate = 0;

  pasta dut (
    .clk(clk), .rst_n(rst_n), .sel(sel), .a(a), .b(b), .cin(cin),
    .sum(sum), .cout(cout), .term(term)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_iterations(int unsigned x, int unsigned y, int unsigned ci);
    int unsigned s, c, t;
    int n = 0;
    s = x ^ y;
    c = ((x & y) << 1) | ci;
    while (c != 0) begin
      t = s & c;
      s = s ^ c;
      c = t << 1;
      n++;
    end
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic add_once(input int unsigned x, input int unsigned y, input int unsigned ci);
    int exp_iter, iters;
    int unsigned exp_total;
    logic [W-1:0] held;
    string tag;
    tag = $sformatf("%0d+%0d+%0d", x, y, ci);
    exp_total = x + y + ci;
    exp_iter  = ref_iterations(x, y, ci);

    // Initial phase.
    @(negedge clk);
    sel = 1'b0; a = W'(x); b = W'(y); cin = 1'(ci);
    #1;
    check(term == 1'b0, {tag, ": TERM high with SEL low"});
    if ((x & y) == 0 && ci == 0) n_sel_gate++;
    @(posedge clk);

    // Iterative phase.
    @(negedge clk);
    sel = 1'b1;
    a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
    #1;
    iters = 0;
    while (!term && iters <= W + 2) begin
      @(posedge clk);
      #1;
      iters++;
    end
    check(term == 1'b1, {tag, ": TERM never rose"});
    check({cout, sum} == (W+1)'(exp_total),
          $sformatf("%s: result %0d expected %0d", tag, {cout, sum}, exp_total));
    check(iters == exp_iter,
          $sformatf("%s: %0d iterations, expected %0d", tag, iters, exp_iter));

    // Result and TERM hold while SEL stays high.
    held = sum;
    repeat (2) @(posedge clk);
    #1;
    check(term == 1'b1 && sum == held, {tag, ": result not held"});

    if (iters == 0) n_zero_iter++;
    if (iters == 1) n_one_iter++;
    if (iters >= 2) n_multi_iter++;
    if (iters == W + 1) n_worst++;
    if (ci != 0 && iters > 0) n_cin_used++;
    if (cout) n_cout++;
    if ($countones(((x & y) << 1) | ci) >= 2) n_parallel++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int unsigned x = 0; x < (1 << W); x++)
      for (int unsigned y = 0; y < (1 << W); y++)
        for (int unsigned ci = 0; ci < 2; ci++)
          add_once(x, y, ci);

    // Return to the idle phase.
    @(negedge clk) sel = 1'b0;
    #1;
    check(term == 1'b0, "TERM high after SEL fell");

    $display("behaviours: no-iteration=%0d one-iteration=%0d several=%0d worst-case=%0d",
             n_zero_iter, n_one_iter, n_multi_iter, n_worst);
    $display("            carry-in used=%0d carry-out=%0d parallel carries=%0d TERM gated by SEL=%0d",
             n_cin_used, n_cout, n_parallel, n_sel_gate);
    check(n_zero_iter  > 0, "no operation finished without iterating");
    check(n_one_iter   > 0, "no operation finished in one iteration");
    check(n_multi_iter > 0, "no operation needed several iterations");
    check(n_worst      > 0, "worst case never reached");
    check(n_cin_used   > 0, "carry-in never used");
    check(n_cout       > 0, "carry-out never produced");
    check(n_parallel   > 0, "never several carries at once");
    check(n_sel_gate   > 0, "TERM gating by SEL never exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
