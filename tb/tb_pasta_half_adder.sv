// tb_pasta_half_adder: exhaustive self-checking test of the half adder
// against its truth table (0+0=00, 0+1=01, 1+0=01, 1+1=10 as carry,sum).
module tb_pasta_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  // Expected {carry, sum} for input index {a, b}, written as the truth table.
  localparam logic [1:0] EXPECT [4] = '{2'b00, 2'b01, 2'b01, 2'b10};

  pasta_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} !== EXPECT[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b: carry,sum=%0b%0b expected %02b", a, b, carry, sum, EXPECT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
