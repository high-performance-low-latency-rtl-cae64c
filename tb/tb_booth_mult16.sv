// tb_booth_mult16: end-to-end check of the 16x16 Booth multiplier at its
// only size (no parameters).
//
// Applies corner operands (0, +-1, extremes, alternating patterns), walking
// ones, and pseudo-random pairs, and compares p with the product worked out
// by the simulator's own signed multiply. The multiplier is combinational,
// so each pair is applied, given 1 ns to settle, and checked: one result per
// evaluation, zero cycles of latency. It also counts how often each
// mechanism of the design was exercised and fails if one never was:
// every Booth digit code (000..111: digits 0, +1, +2, -2, -1, -0) in every
// one of the eight rows (row 0 only has the codes with b[-1] = 0), and a carry out of the row-7 neg increment (last
// digit negative with the five low bits of its row all ones). Both are
// worked out from the operands alone. The carry-select lines of the final
// adder are exercised in its own testbench.
module tb_booth_mult16;
  import mult_pkg::*;

  logic [N-1:0]   a, b;
  logic [P_W-1:0] p;

  booth_mult16 dut (.a(a), .b(b), .p(p));

  int unsigned checks   = 0;
  int unsigned failures = 0;

  // mechanism counters
  int unsigned digit_cnt [8][8];       // [row][{b2i+1, b2i, b2i-1}]
  int unsigned r7_inc_carry = 0;

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    logic signed [P_W-1:0] expect_p;
    logic [N:0] bx;
    logic [2:0] d7;
    logic [5:0] r7;
    a = ta;
    b = tb_;
    #1ns;
    expect_p = P_W'($signed(ta)) * P_W'($signed(tb_));
    checks++;
    if (p !== expect_p) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%0d b=%0d p=%h expected %h",
                 $signed(ta), $signed(tb_), p, expect_p);
    end
    bx = {tb_, 1'b0};
    for (int i = 0; i < PP_ROWS; i++) digit_cnt[i][bx[2*i +: 3]]++;
    // low five bits of row 7 (one's complement of d7*a when negative)
    d7 = bx[14 +: 3];
    case (d7)
      3'b001, 3'b010: r7 = 6'({1'b0, ta[4:0]});
      3'b101, 3'b110: r7 = 6'({1'b0, ~ta[4:0]});
      3'b011:         r7 = 6'({1'b0, ta[3:0], 1'b0});
      3'b100:         r7 = 6'({1'b0, ~ta[3:0], 1'b1});
      3'b111:         r7 = 6'h1F;
      default:        r7 = 6'h00;
    endcase
    if (d7[2] && r7[4:0] == 5'h1F) r7_inc_carry++;
  endtask

  localparam logic [N-1:0] CORNER [10] = '{
    16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000,
    16'h8001, 16'h5555, 16'hAAAA, 16'h00FF, 16'hFF00};

  initial begin
    for (int i = 0; i < 8; i++)
      for (int d = 0; d < 8; d++) digit_cnt[i][d] = 0;
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++) apply(CORNER[i], CORNER[j]);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        apply(N'(1) << i, N'(1) << j);
        apply(~(N'(1) << i), N'(1) << j);
      end
    for (int n = 0; n < 2000000; n++) apply(N'($urandom), N'($urandom));

    for (int i = 0; i < 8; i++)
      for (int d = 0; d < 8; d++)
        // row 0 sees b[-1] = 0, so only its even codes can occur
        if (digit_cnt[i][d] == 0 && !(i == 0 && d % 2 == 1)) begin
          failures++;
          $display("Booth digit code %b never seen in row %0d", 3'(d), i);
        end
    if (r7_inc_carry == 0) begin failures++; $display("row-7 increment never carried"); end
    $display("row 0 digit codes 000..111: %0d %0d %0d %0d %0d %0d %0d %0d",
             digit_cnt[0][0], digit_cnt[0][1], digit_cnt[0][2], digit_cnt[0][3],
             digit_cnt[0][4], digit_cnt[0][5], digit_cnt[0][6], digit_cnt[0][7]);
    $display("row-7 increment carries: %0d", r7_inc_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
