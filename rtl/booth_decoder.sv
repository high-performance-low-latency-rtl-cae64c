// booth_decoder: builds one radix-4 partial-product row from the multiplicand.
//
// For every output bit j (0..AW) the row bit is
//   pp[j] = z ? ((x ? a[j] : a[j-1]) ^ neg) : neg
// i.e. each multiplicand bit is first XORed with Neg, then a first mux
// level (x / x_bar) picks the 1x or the 2x (shifted) bit, and a second mux
// level (z / z_bar) either passes that bit or forces the row to Neg. This
// XOR-then-two-mux-levels arrangement follows the source decoder circuit.
// With neg=1 the row holds the one's complement of the selected multiple;
// the missing +1 (the neg bit) is added by the reduction tree at the row's
// LSB. A zero digit gives all zeros, the "-0" digit (b bits 111) gives all
// ones, which with its +1 is again zero.
// Design choice: the multiplicand is two's complement, so the extra top
// position uses a[AW-1] as a[AW] (sign extension); a[-1] is 0.
// Interface: a (AW bits, default 16), sel (neg, x, z) -> pp (AW+1 bits,
// one's-complemented when neg). Combinational.
module booth_decoder
  import mult_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic [AW-1:0] a,
  input  booth_sel_t   sel,
  output logic [AW:0]  pp
);

  // a_x[k] holds a[k-1]: a_x[0] = a[-1] = 0, a_x[AW+1] = a[AW] = a[AW-1].
  logic [AW+1:0] a_x;
  logic [AW+1:0] t;     // a_x ^ neg

  always_comb begin
    a_x = {a[AW-1], a, 1'b0};
    t   = a_x ^ {(AW+2){sel.neg}};
    for (int j = 0; j <= AW; j++) begin
      pp[j] = sel.z ? (sel.x ? t[j+1] : t[j]) : sel.neg;
    end
  end

endmodule
