// mult_pkg: sizes and types shared by the 16x16 radix-4 Booth multiplier.
//
// The multiplier takes two 16-bit two's-complement operands and forms
// eight radix-4 partial-product rows of 17 bits each. The rows are reduced
// to two by a two-stage 4-2 compressor tree; the low 8 product bits are
// finished inside the tree, the middle 20 bits by a carry-select adder and
// the top 4 bits by a short ripple adder. The 16-bit width, the eight rows,
// the 20-bit carry-select adder built from 4-bit blocks and the 8/20/4 split
// of the product follow the source design; the signedness of the operands
// is this design's choice.
package mult_pkg;

  localparam int unsigned N        = 16;         // operand width
  localparam int unsigned PP_ROWS  = N / 2;      // radix-4 partial-product rows
  localparam int unsigned PP_W     = N + 1;      // bits per partial-product row
  localparam int unsigned P_W      = 2 * N;      // product width
  localparam int unsigned LO_BITS  = 8;          // product bits finished in the tree
  localparam int unsigned CSA_BITS = 20;         // bits added by the carry-select adder
  localparam int unsigned HI_BITS  = P_W - LO_BITS - CSA_BITS;  // top bits (4)

  // One radix-4 Booth digit as the encoder hands it to a decoder row.
  //   neg : the digit is negative (row is inverted, +1 added at its LSB)
  //   x   : magnitude 1 (select a_j); when x=0 and z=1 the magnitude is 2
  //   z   : the digit is non-zero
  typedef struct packed {
    logic neg;
    logic x;
    logic z;
  } booth_sel_t;

  typedef logic [PP_W-1:0] pp_row_t;

endpackage
