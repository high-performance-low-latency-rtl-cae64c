// half_add: half adder, {carry, sum} = a + b. Used in the short columns of
// the first reduction stage and in the row-7 neg increment. Combinational.
module half_add (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
