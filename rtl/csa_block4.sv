// csa_block4: 4-bit carry-select adder block.
//
// Two 4-bit ripple adders work in parallel on the same operands, one with
// carry-in 0 and one with carry-in 1. When the real carry-in arrives it only
// steers the output muxes: s and cout are taken from the adder whose assumed
// carry-in was right. The delay from cin to the outputs is one mux.
// Structure as in the source block; the ripple rows alternate the two
// full-adder cells (fa_mux, fa_mux_inv).
// Interface: s = a + b + cin (4 bits), cout = carry out. Combinational.
module csa_block4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);

  logic [3:0] s0, s1;
  logic       c0, c1;

  ripple_add #(.W(4)) u_add0 (.a(a), .b(b), .cin(1'b0), .s(s0), .cout(c0));
  ripple_add #(.W(4)) u_add1 (.a(a), .b(b), .cin(1'b1), .s(s1), .cout(c1));

  always_comb begin
    s    = cin ? s1 : s0;
    cout = cin ? c1 : c0;
  end

endmodule
