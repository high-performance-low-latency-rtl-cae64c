// tb_fa_mux_inv: exhaustive check of the full-adder cell fa_mux_inv:
// {carry, sum} must equal a + b + cin for all eight input combinations.
module tb_fa_mux_inv;
  logic a, b, cin, sum, carry;

  fa_mux_inv dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  int unsigned checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1ns;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b sum=%b carry=%b", a, b, cin, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
