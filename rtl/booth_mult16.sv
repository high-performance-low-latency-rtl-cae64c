// booth_mult16: 16x16 two's-complement radix-4 Booth multiplier, fully
// combinational (no clock, no pipeline registers).
//
// p = a * b in three steps:
//   1. Partial products. Eight booth_encoder cells recode b into radix-4
//      digits {0, +-1, +-2}; eight booth_decoder rows turn a into the
//      17-bit rows (one's complement for negative digits, neg bit apart).
//   2. Reduction. pprt compresses the eight rows plus neg bits to two rows
//      with a stage of comp42_inv cells (inverted outputs) followed by a
//      stage of comp42_prop cells (inverted inputs), and finishes product
//      bits 7..0 itself.
//   3. Final addition. csa20, five 4-bit carry-select blocks, adds columns
//      8..27 with the carry from the tree; a 4-bit ripple of the same
//      full-adder cells finishes bits 31..28 from the csa20 carry-out.
// The critical path is Booth logic + two compressor cells + final adder.
// Design choices: operands are signed; the top four bits, which the source
// also assigns to the tree, need the carry of the 20-bit adder and are
// therefore added after it.
module booth_mult16
  import mult_pkg::*;
(
  input  logic [N-1:0]   a,   // multiplicand
  input  logic [N-1:0]   b,   // multiplier (Booth-recoded)
  output logic [P_W-1:0] p    // product
);

  // ---------------- Booth encoders and decoders ----------------
  logic [N:0]         b_x;    // b with b[-1] = 0 below bit 0
  booth_sel_t         sel [PP_ROWS];
  logic [PP_ROWS-1:0] z_n;
  pp_row_t            pp  [PP_ROWS];
  logic [PP_ROWS-1:0] neg;

  assign b_x = {b, 1'b0};

  for (genvar i = 0; i < PP_ROWS; i++) begin : g_row
    booth_encoder u_enc (
      .b_hi (b_x[2*i+2]),
      .b_mid(b_x[2*i+1]),
      .b_lo (b_x[2*i]),
      .sel  (sel[i]),
      .z_n  (z_n[i])
    );
    booth_decoder #(.AW(N)) u_dec (
      .a  (a),
      .sel(sel[i]),
      .pp (pp[i])
    );
    assign neg[i] = sel[i].neg;
  end

  // ---------------- reduction tree ----------------
  logic [LO_BITS-1:0]     lo;
  logic                   lo_cout;
  logic [P_W-LO_BITS-1:0] row_s, row_c;

  pprt u_pprt (
    .pp     (pp),
    .neg    (neg),
    .lo     (lo),
    .lo_cout(lo_cout),
    .row_s  (row_s),
    .row_c  (row_c)
  );

  // ---------------- final adder ----------------
  logic [CSA_BITS-1:0]   mid;
  logic [CSA_BITS/4-1:0] se;
  logic                  mid_cout;
  logic [HI_BITS-1:0]    hi;
  logic                  hi_cout;

  csa20 #(.NBLK(CSA_BITS / 4)) u_csa (
    .a   (row_s[CSA_BITS-1:0]),
    .b   (row_c[CSA_BITS-1:0]),
    .cin (lo_cout),
    .s   (mid),
    .se  (se),
    .cout(mid_cout)
  );

  ripple_add #(.W(HI_BITS)) u_hi (
    .a   (row_s[P_W-LO_BITS-1:CSA_BITS]),
    .b   (row_c[P_W-LO_BITS-1:CSA_BITS]),
    .cin (mid_cout),
    .s   (hi),
    .cout(hi_cout)   // weight 2^32, outside the product
  );

  assign p = {hi, mid, lo};

endmodule
