// booth_encoder: radix-4 (modified Booth) encoder for one multiplier digit.
//
// Looks at three overlapping multiplier bits b[2i+1], b[2i], b[2i-1] and
// produces the control lines that a decoder row needs:
//   neg = b[2i+1]                          digit is negative
//   x   = b[2i] ^ b[2i-1]                  magnitude 1
//   z   = (b[2i]^b[2i-1]) | (b[2i]^b[2i+1])  digit is non-zero
// The two XORs (x1, x2) and the inverted non-zero flag z_n, from which z is
// taken through an inverter, follow the source encoder circuit; the truth
// table (digits 0, +-1, +-2 and -0 for 111) is the source's Booth table.
// Purely combinational, no clock.
module booth_encoder
  import mult_pkg::*;
(
  input  logic       b_hi,   // b[2i+1]
  input  logic       b_mid,  // b[2i]
  input  logic       b_lo,   // b[2i-1] (0 for the first digit)
  output booth_sel_t sel,    // {neg, x, z}
  output logic       z_n     // complement of z, as built in the encoder
);

  logic x1, x2;

  always_comb begin
    x1      = b_mid ^ b_lo;
    x2      = b_mid ^ b_hi;
    z_n     = ~(x1 | x2);
    sel.neg = b_hi;
    sel.x   = x1;
    sel.z   = ~z_n;
  end

endmodule
