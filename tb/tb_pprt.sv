// tb_pprt: checks the partial-product reduction tree on its own. Drives
// arbitrary 17-bit rows and neg bits (not only those a Booth decoder can
// produce) and checks that the finished low byte plus the two output rows
// add up to
//   sum_i (signed(pp_i) + neg_i) * 4^i   (mod 2^32),
// the value the tree must preserve. Also checks rows that are all zeros
// and all ones, and counts a carry out of the row-7 neg increment.
module tb_pprt;
  import mult_pkg::*;

  pp_row_t                pp [PP_ROWS];
  logic [PP_ROWS-1:0]     neg;
  logic [LO_BITS-1:0]     lo;
  logic                   lo_cout;
  logic [P_W-LO_BITS-1:0] row_s, row_c;

  pprt dut (.pp(pp), .neg(neg), .lo(lo), .lo_cout(lo_cout), .row_s(row_s), .row_c(row_c));

  int unsigned checks = 0, failures = 0, inc_carry = 0;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [P_W-1:0] expect_v, got;
    expect_v = '0;
    for (int i = 0; i < PP_ROWS; i++)
      expect_v += (P_W'($signed(pp[i])) + P_W'(neg[i])) << (2 * i);
    #1ns;
    got = {row_s, {LO_BITS{1'b0}}} + {row_c, {LO_BITS{1'b0}}}
        + (P_W'(lo_cout) << LO_BITS) + P_W'(lo);
    checks++;
    if (got !== expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL got %h expected %h", got, expect_v);
    end
    if (neg[PP_ROWS-1] && pp[PP_ROWS-1][4:0] == 5'h1F) inc_carry++;
  endtask

  initial begin
    for (int i = 0; i < PP_ROWS; i++) pp[i] = '0;
    neg = '0;
    check();
    for (int i = 0; i < PP_ROWS; i++) pp[i] = '1;
    neg = '1;
    check();
    for (int n = 0; n < 100000; n++) begin
      for (int i = 0; i < PP_ROWS; i++) pp[i] = PP_W'($urandom);
      neg = PP_ROWS'($urandom);
      if (n % 8 == 0) pp[PP_ROWS-1][4:0] = 5'h1F;
      check();
    end
    if (inc_carry == 0) begin failures++; $display("row-7 increment never carried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
