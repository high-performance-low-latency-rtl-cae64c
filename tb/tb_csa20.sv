// tb_csa20: checks the 20-bit carry-select adder (default five 4-bit
// blocks). For corner and random operands it compares {cout, s} with
// a + b + cin and each select line se[k] with the carry out of the low
// 4*(k+1) bits, worked out by plain addition. Counts that every select
// line was seen both at 0 and at 1.
module tb_csa20;
  localparam int unsigned NBLK = 5;
  localparam int unsigned W    = 4 * NBLK;

  logic [W-1:0]    a, b, s;
  logic            cin, cout;
  logic [NBLK-1:0] se;

  csa20 dut (.a(a), .b(b), .cin(cin), .s(s), .se(se), .cout(cout));

  int unsigned checks = 0, failures = 0;
  int unsigned seen1 [NBLK];
  int unsigned seen0 [NBLK];

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] full;
    a = ta; b = tb_; cin = tc;
    #1ns;
    full = (W+1)'(ta) + (W+1)'(tb_) + (W+1)'(tc);
    checks++;
    if ({cout, s} !== full) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b got %h expected %h", ta, tb_, tc, {cout, s}, full);
    end
    for (int k = 0; k < NBLK; k++) begin
      logic [4*NBLK:0] part;
      part = ((W+1)'(ta) & ((W+1)'(1) << (4*(k+1))) - 1)
           + ((W+1)'(tb_) & ((W+1)'(1) << (4*(k+1))) - 1) + (W+1)'(tc);
      checks++;
      if (se[k] !== part[4*(k+1)]) begin
        failures++;
        if (failures < 10) $display("FAIL se[%0d]=%b", k, se[k]);
      end
      if (se[k]) seen1[k]++; else seen0[k]++;
    end
  endtask

  initial begin
    for (int k = 0; k < NBLK; k++) begin seen0[k] = 0; seen1[k] = 0; end
    check('0, '0, 1'b0);
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('1, 20'h00001, 1'b0);
    for (int n = 0; n < 100000; n++) check(W'($urandom), W'($urandom), 1'($urandom));
    for (int k = 0; k < NBLK; k++)
      if (seen0[k] == 0 || seen1[k] == 0) begin
        failures++;
        $display("select line SE%0d did not take both values", k);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
