// tb_booth_decoder: checks one Booth partial-product row at the default
// 16-bit width. For every legal encoder output (the digits 0, +1, +2, -2,
// -1, -0) and many multiplicands it checks that the row read as a signed
// 17-bit number, plus the neg bit, equals digit * a.
// Combinational: each input is given 1 ns to settle.
module tb_booth_decoder;
  import mult_pkg::*;

  logic [15:0] a;
  booth_sel_t  sel;
  logic [16:0] pp;

  booth_decoder dut (.a(a), .sel(sel), .pp(pp));

  int unsigned checks = 0, failures = 0;

  // {neg, x, z} and digit value for the six distinct encoder outputs
  localparam logic [2:0] SEL   [6] = '{3'b000, 3'b011, 3'b001, 3'b101, 3'b111, 3'b100};
  localparam int         DIGIT [6] = '{0, 1, 2, -2, -1, 0};

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] ta, input int s);
    int got, expect_v;
    a   = ta;
    sel = SEL[s];
    #1ns;
    got      = int'($signed(pp)) + int'(sel.neg);
    expect_v = DIGIT[s] * int'($signed(ta));
    checks++;
    if (got !== expect_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%0d sel=%b pp=%h got %0d expected %0d",
                 $signed(ta), SEL[s], pp, got, expect_v);
    end
  endtask

  initial begin
    for (int s = 0; s < 6; s++) begin
      check(16'h0000, s); check(16'h0001, s); check(16'hFFFF, s);
      check(16'h7FFF, s); check(16'h8000, s);
      for (int n = 0; n < 5000; n++) check(16'($urandom), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
