// tb_comp42_prop: exhaustive check (all 16 inputs x 2 carries-in) of the
// second-stage 4-2 compressor that takes inverted inputs. Drives ~I and
// checks
//   I1+I2+I3+I4+Cin = Sum + 2*(Carry + Cout),
// that Cout does not depend on Cin, and every entry of the general 4-2
// truth table that is not a "don't care" (inputs with 0, 1, 3 or 4 ones).
module tb_comp42_prop;
  logic [3:0] i_n;
  logic       cin, sum, carry, cout;

  comp42_prop dut (.i_n(i_n), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  int unsigned checks = 0, failures = 0;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout_c0;
      for (int c = 0; c < 2; c++) begin
        int n;
        logic s, cy, co;
        i_n   = ~4'(v);
        cin   = 1'(c);
        #1ns;
        n  = $countones(4'(v));
        s  = sum; cy = carry; co = cout;
        checks++;
        if (n + c != int'(s) + 2 * (int'(cy) + int'(co))) begin
          failures++;
          $display("FAIL sum: i=%b cin=%0d s=%b cy=%b co=%b", 4'(v), c, s, cy, co);
        end
        // table entries fixed by the general truth table
        if (n != 2) begin
          checks++;
          if (co !== (n >= 3) || cy !== ((n == 4) || (n + c == 2) || (n == 3 && c == 1))) begin
            failures++;
            $display("FAIL table: i=%b cin=%0d cy=%b co=%b", 4'(v), c, cy, co);
          end
        end
        if (c == 0) cout_c0 = co;
        else begin
          checks++;
          if (co !== cout_c0) begin
            failures++;
            $display("FAIL Cout depends on Cin for i=%b", 4'(v));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
