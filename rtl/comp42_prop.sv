// comp42_prop: second-stage 4-2 compressor driven by inverted inputs.
//
// Same arithmetic as any 4-2 compressor,
//   I1 + I2 + I3 + I4 + Cin = Sum + 2*(Carry + Cout),
// but the four column inputs arrive inverted (i_n = ~I) straight from the
// inverted outputs of the first-stage cells, and Sum, Carry and Cout leave
// in true polarity. This removes the inverters that would otherwise sit
// between the two compressor stages.
// Following the source equations, computed on the inverted input nodes:
//   E     = (I1^I2) ^ (I3^I4)          (an XOR of four bits is the same for
//                                       the inverted and the true inputs)
//   F     = ~(i_n1 | i_n2 | i_n3 | i_n4)   (all four true inputs high)
//   Carry = (E & Cin & ~F) | F         (mux on Cin between 0 and E, then
//                                       a mux on F forcing 1)
//   Sum   = E ^ Cin                    (mux on Cin between E and ~E)
//   Cout  = 1 when at least two of I1..I4 are high, built from the nets
//           n1 = I1|I3, n2 = I2|I4, n3 = I1&I3, n4 = I2&I4 as
//           Cout = (n1 & n2) | n3 | n4.
// The cin port is true polarity; in a row Cout of one cell drives Cin of
// the next. Combinational.
module comp42_prop (
  input  logic [3:0] i_n,     // inverted I4..I1 (i_n[0] = ~I1)
  input  logic       cin,
  output logic       sum,
  output logic       carry,   // weight of the next column
  output logic       cout     // horizontal carry-out, next column
);

  logic e, f, n1, n2, n3, n4;

  always_comb begin
    e     = (i_n[0] ^ i_n[1]) ^ (i_n[2] ^ i_n[3]);
    f     = ~(i_n[0] | i_n[1] | i_n[2] | i_n[3]);
    sum   = cin ? ~e : e;
    carry = f ? 1'b1 : (cin ? e : 1'b0);
    n1    = ~(i_n[0] & i_n[2]);
    n2    = ~(i_n[1] & i_n[3]);
    n3    = ~(i_n[0] | i_n[2]);
    n4    = ~(i_n[1] | i_n[3]);
    cout  = (n1 & n2) | n3 | n4;
  end

endmodule
