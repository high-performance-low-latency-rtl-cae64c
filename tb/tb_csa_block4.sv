// tb_csa_block4: exhaustive check of the 4-bit carry-select block over all
// operand pairs and both carries-in: {cout, s} must equal a + b + cin.
module tb_csa_block4;
  logic [3:0] a, b, s;
  logic       cin, cout;

  csa_block4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  int unsigned checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1ns;
      checks++;
      if ({cout, s} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%b s=%h cout=%b", a, b, cin, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
