// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder against
// the Booth truth table (Neg, X, Z for all eight bit triples), plus the
// relation z_n = ~z. Combinational: each input is given 1 ns to settle.
module tb_booth_encoder;
  import mult_pkg::*;

  logic       b_hi, b_mid, b_lo, z_n;
  booth_sel_t sel;

  booth_encoder dut (.b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .sel(sel), .z_n(z_n));

  int unsigned checks = 0, failures = 0;

  // {neg, x, z} for b2i+1 b2i b2i-1 = 000 .. 111
  localparam logic [2:0] TABLE [8] = '{
    3'b000, 3'b011, 3'b011, 3'b001, 3'b101, 3'b111, 3'b111, 3'b100};

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {b_hi, b_mid, b_lo} = 3'(v);
      #1ns;
      checks++;
      if ({sel.neg, sel.x, sel.z} !== TABLE[v] || z_n !== ~sel.z) begin
        failures++;
        $display("FAIL bits=%b got neg=%b x=%b z=%b z_n=%b", 3'(v),
                 sel.neg, sel.x, sel.z, z_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
