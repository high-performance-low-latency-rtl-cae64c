// csa20: carry-select final adder of the multiplier (20 bits by default).
//
// NBLK 4-bit carry-select blocks are chained: the carry selected by block k
// (select line se[k]) steers the output muxes of block k+1, so the carry
// crosses each block in one mux delay once the block sums are ready. With
// the default NBLK = 5 it adds the 20 middle columns (product bits 8..27)
// of the two rows that leave the reduction tree. Five 4-bit blocks and the
// select lines SE0..SE4 follow the source adder.
// Interface: s = a + b + cin over 4*NBLK bits; se[k] is the carry out of
// block k, se[NBLK-1] = cout. Combinational.
module csa20 #(
  parameter int unsigned NBLK = 5
) (
  input  logic [4*NBLK-1:0] a,
  input  logic [4*NBLK-1:0] b,
  input  logic              cin,
  output logic [4*NBLK-1:0] s,
  output logic [NBLK-1:0]   se,
  output logic              cout
);

  logic [NBLK:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    csa_block4 u_blk (
      .a   (a[4*k +: 4]),
      .b   (b[4*k +: 4]),
      .cin (c[k]),
      .s   (s[4*k +: 4]),
      .cout(c[k+1])
    );
    assign se[k] = c[k+1];
  end

  assign cout = c[NBLK];

endmodule
