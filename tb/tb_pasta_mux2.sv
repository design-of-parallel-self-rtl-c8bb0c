// tb_pasta_mux2: exhaustive self-checking test of the 2:1 multiplexer:
// out must follow d0 while sel is 0 and d1 while sel is 1.
module tb_pasta_mux2;
  logic d0, d1, sel, out;
  int checks = 0, failures = 0;

  pasta_mux2 dut (.d0(d0), .d1(d1), .sel(sel), .out(out));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, d1, d0} = 3'(i);
      #1;
      checks++;
      if (out !== (i >= 4 ? ((i >> 1) & 1) : (i & 1))) begin
        failures++;
        $display("FAIL sel=%0b d1=%0b d0=%0b out=%0b", sel, d1, d0, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
