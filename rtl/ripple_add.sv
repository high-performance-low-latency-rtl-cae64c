// ripple_add: W-bit ripple-carry adder built from the carry-selected
// full-adder cells.
//
// Cells alternate: bit 0, 2, 4, ... (the 1st, 3rd, ... cell) use fa_mux,
// bits 1, 3, 5, ... use fa_mux_inv, as the final adder of the multiplier
// does. s = a + b + cin, cout is the carry out of the top bit.
// Combinational; the carry ripples through W cells.
module ripple_add #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;
  assign c[0] = cin;
  assign cout = c[W];

  for (genvar k = 0; k < W; k++) begin : g_bit
    if (k % 2 == 0) begin : g_main
      fa_mux u_fa (.a(a[k]), .b(b[k]), .cin(c[k]), .sum(s[k]), .carry(c[k+1]));
    end else begin : g_mod
      fa_mux_inv u_fa (.a(a[k]), .b(b[k]), .cin(c[k]), .sum(s[k]), .carry(c[k+1]));
    end
  end

endmodule
