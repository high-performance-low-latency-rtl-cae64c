// fa_mux_inv: modified carry-in-selected full adder with output inverters.
//
// The mux picks inverted candidates,
//   Sum_n   = Cin ? (A^B)    : ~(A^B)
//   Carry_n = Cin ? ~(A|B)   : ~(A&B)
// and an inverter on each output restores true polarity. Used at the even
// positions (2nd, 4th, ...) of a ripple row, between two fa_mux cells, so
// that the carry path does not run through a long string of bare
// pass-gate muxes. Logically it is a full adder. Combinational.
module fa_mux_inv (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);

  logic p, sum_n, carry_n;

  always_comb begin
    p       = a ^ b;
    sum_n   = cin ? p : ~p;
    carry_n = cin ? ~(a | b) : ~(a & b);
    sum     = ~sum_n;
    carry   = ~carry_n;
  end

endmodule
