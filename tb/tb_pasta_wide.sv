// tb_pasta_wide: random-operand test of a 32-bit parallel self-timed adder,
// measuring how many iterations an addition takes on average.
//
// The adder iterates until every carry has settled, so its time depends on
// the operands: a carry only travels along its own run of propagating bits,
// and all runs settle in parallel. For random operands the longest such run
// grows with the logarithm of the width, so the mean number of iterations at
// 32 bits should stay close to log2(32) = 5, far below the worst case of 33.
// Each addition is checked for its result and for the iteration count given
// by a word-level model of the recursion; the test fails if the mean exceeds
// 2*log2(WIDTH). A few directed worst cases (a full carry ripple) are added.
module tb_pasta_wide;
  localparam int W = 32;
  localparam int N_OPS = 4000;

  logic         clk = 1'b0, rst_n = 1'b0, sel = 1'b0, cin = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [W-1:0] sum;
  logic         cout, term;
  int checks = 0, failures = 0;
  longint total_iters = 0;
  int max_iters = 0;

  pasta #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .sel(sel), .a(a), .b(b), .cin(cin),
    .sum(sum), .cout(cout), .term(term)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (N_OPS * (W + 8)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_iterations(longint unsigned x, longint unsigned y, longint unsigned ci);
    longint unsigned s, c, t;
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

  task automatic add_once(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    int iters, exp_iter;
    longint unsigned exp_total;
    exp_total = longint'(x) + longint'(y) + longint'(ci);
    exp_iter  = ref_iterations(longint'(x), longint'(y), longint'(ci));
    @(negedge clk);
    sel = 1'b0; a = x; b = y; cin = ci;
    @(posedge clk);
    @(negedge clk);
    sel = 1'b1;
    #1;
    iters = 0;
    while (!term && iters <= W + 2) begin
      @(posedge clk);
      #1;
      iters++;
    end
    check(term == 1'b1 && {cout, sum} == (W+1)'(exp_total),
          $sformatf("%h+%h+%0d: result %h expected %h", x, y, ci, {cout, sum}, exp_total));
    check(iters == exp_iter,
          $sformatf("%h+%h+%0d: %0d iterations, expected %0d", x, y, ci, iters, exp_iter));
    total_iters += iters;
    if (iters > max_iters) max_iters = iters;
  endtask

  initial begin
    real mean;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int i = 0; i < N_OPS; i++)
      add_once(W'($urandom), W'($urandom), 1'($urandom));
    mean = real'(total_iters) / N_OPS;
    $display("random operands: mean iterations %0.2f, longest %0d, worst case %0d",
             mean, max_iters, W + 1);
    check(mean <= 2.0 * $clog2(W), "mean iteration count not logarithmic");

    // Directed: carry-in rippling through all ones, and a lone generate at bit 0.
    add_once('1, '0, 1'b1);
    add_once('1, W'(1), 1'b0);
    add_once('0, '0, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
