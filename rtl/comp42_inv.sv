// comp42_inv: first-stage 4-2 compressor with complemented outputs.
//
// Adds four bits of one column plus a horizontal carry-in:
//   I1 + I2 + I3 + I4 + Cin = Sum + 2*(Carry + Cout)
// Cout depends on I1..I4 only, so a row of these cells has no ripple. The
// cell delivers all three outputs inverted (sum_n, carry_n, cout_n); in the
// multiplier they feed the second-stage compressor, which takes inverted
// inputs, so no inverters sit between the two stages. The horizontal chain
// stays inverted as well: cin_n of one cell is cout_n of its neighbour.
// Internal nets follow the names of the source circuit:
//   A = I1^I2, B = I3^I4, C = ~(I1&I2), D = ~(I1|I2), E = ~(I3|I4),
//   F = ~(I3&I4).
// The outputs are muxes on these nets, following the source cell's
// pass-gate networks:
//   Sum_n   = Cin ? (A^B)    : ~(A^B)
//   Carry_n = Cin ? (A ? B : E) : (A ? 1 : F)
//   Cout_n  = E ? C : D
// i.e. Cout = (I3|I4)==0 ? I1&I2 : I1|I2 and Carry = (A^B) ? Cin : I3&I4.
// The general 4-2 truth table leaves Carry and Cout open when exactly two
// inputs are high; this reading of the cell settles those cases (the pair
// I3=I4=1 goes to Carry, every other pair to Cout) and meets the table in
// all other cases. The exact gate functions behind A..F are this design's
// reading of the cell.
// Combinational.
module comp42_inv (
  input  logic [3:0] i,        // I4..I1, true polarity (i[0] = I1)
  input  logic       cin_n,    // inverted horizontal carry-in
  output logic       sum_n,
  output logic       carry_n,  // inverted carry, weight of the next column
  output logic       cout_n    // inverted horizontal carry-out, next column
);

  logic na, nb, nc, nd, ne, nf, cin;

  always_comb begin
    cin     = ~cin_n;
    na      = i[0] ^ i[1];
    nb      = i[2] ^ i[3];
    nc      = ~(i[0] & i[1]);
    nd      = ~(i[0] | i[1]);
    ne      = ~(i[2] | i[3]);
    nf      = ~(i[2] & i[3]);
    sum_n   = cin ? (na ^ nb) : ~(na ^ nb);
    carry_n = cin ? (na ? nb : ne) : (na ? 1'b1 : nf);
    cout_n  = ne ? nc : nd;
  end

endmodule
