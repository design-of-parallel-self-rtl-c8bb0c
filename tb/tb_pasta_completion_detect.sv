// tb_pasta_completion_detect: exhaustive self-checking test of the
// completion detection unit at its default size (6 carries): term must be 1
// exactly when sel is 1 and no carry is 1.
module tb_pasta_completion_detect;
  localparam int N = 6;
  logic         sel, term;
  logic [N-1:0] carry;
  int checks = 0, failures = 0;

  pasta_completion_detect dut (.sel(sel), .carry(carry), .term(term));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < (1 << N); c++) begin
        sel   = 1'(s);
        carry = N'(c);
        #1;
        checks++;
        if (term !== (s == 1 && c == 0)) begin
          failures++;
          $display("FAIL sel=%0d carry=%b term=%0b", s, carry, term);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
