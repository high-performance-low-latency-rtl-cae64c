// tb_half_add: exhaustive check of the half adder half_add:
// {carry, sum} must equal a + b for all four input combinations.
module tb_half_add;
  logic a, b, sum, carry;

  half_add dut (.a(a), .b(b), .sum(sum), .carry(carry));

  int unsigned checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1ns;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b sum=%b carry=%b", a, b, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
