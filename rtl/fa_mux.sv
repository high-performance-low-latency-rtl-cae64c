// fa_mux: full adder whose outputs are chosen by the carry-in.
//
// Sum   = Cin ? ~(A^B) : (A^B)
// Carry = Cin ? (A|B)  : (A&B)
// Both candidates depend on A and B only, so a late carry-in sees a single
// mux delay. This is the main full-adder cell of the final adder and is
// used at the odd positions (1st, 3rd, ...) of a ripple row, alternating
// with fa_mux_inv. Combinational.
module fa_mux (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);

  logic p;

  always_comb begin
    p     = a ^ b;
    sum   = cin ? ~p : p;
    carry = cin ? (a | b) : (a & b);
  end

endmodule
