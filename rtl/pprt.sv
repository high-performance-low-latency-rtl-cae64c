// pprt: partial-product reduction tree of the 16x16 Booth multiplier.
//
// Eight partial-product rows (row i weighted by 4^i) and their eight neg
// bits are reduced to two rows in two compressor stages:
//   stage 1  rows 0..3 and rows 4..7 are each reduced to two rows. The
//            tall middle columns use comp42_inv cells chained by inverted
//            Cout -> Cin; at the ends of a group, where a column holds
//            fewer bits, a full adder or half adder closes the chain and
//            columns that already fit in two rows pass through. Each
//            group leaves two inverted rows.
//   stage 2  the four inverted rows go straight into a row of comp42_prop
//            cells, which take inverted inputs and give true Sum/Carry.
// The two rows that remain are S (Sum of column k) and C (Carry of column
// k-1). Columns 0..7 are then added by an 8-bit ripple of full-adder cells,
// so the low product byte leaves the tree finished; columns 8..31 leave as
// the two rows row_s/row_c together with the carry into column 8.
//
// Row layout (sign-extension-free form). Row i holds pp_i[15:0] at columns
// 2i..2i+15. The sign extension of all rows is replaced by the constant
// -sum(2^(16+2i)) = 0xAAAB0000 (mod 2^32), folded into the rows:
//   row 0     : pp0[16], pp0[16], ~pp0[16] at columns 16, 17, 18
//   row i >= 1: ~pp_i[16] at column 2i+16 and a constant 1 at 2i+17
// The +1 of a negative row i sits at column 2i, in the empty slot of row
// i+1 (neg0..neg2 in group 1, neg3..neg6 in group 2). Column 14 would then
// hold nine bits, one more than two 4-2 stages take, so neg7 is instead
// added to the five lowest bits of row 7 by a five half-adder increment;
// its carry goes to column 19, the free slot just above row 0.
// The sign scheme, the neg placement, the row-7 increment, the rule that
// picks each first-stage cell and the low 8-bit ripple are this design's
// choice; the two groups of four rows, the compressor cell of each stage,
// the half/full adders at the group ends and the low 8 bits finished in
// the tree follow the source.
// Columns above 31 are dropped: the result is exact modulo 2^32.
// Combinational.
module pprt
  import mult_pkg::*;
(
  input  pp_row_t                 pp [PP_ROWS],  // Booth decoder rows
  input  logic [PP_ROWS-1:0]      neg,           // +1 for each negative row
  output logic [LO_BITS-1:0]      lo,            // product bits 7..0
  output logic                    lo_cout,       // carry into column 8
  output logic [P_W-LO_BITS-1:0]  row_s,         // sum row, columns 8..31
  output logic [P_W-LO_BITS-1:0]  row_c          // carry row, columns 8..31
);

  localparam int W = P_W;

  // ---------------- slot occupancy of the row layout ----------------
  // Group g (0: rows 0..3, 1: rows 4..7) has four slots per column; slot s
  // of group g normally carries row 4g+s. The extra bits (neg0..neg6 and
  // the row-7 increment carry) sit in slots that their row leaves empty.
  function automatic bit occupied(int g, int s, int col);
    int r;
    r = 4 * g + s;
    if (r == 0 && col >= 0 && col <= 18)                 return 1'b1;
    if (r != 0 && col >= 2 * r && col <= 2 * r + 17)     return 1'b1;
    if (g == 0 && s == 0 && col == 19)                   return 1'b1;  // increment carry
    if (s != 0 && col == 2 * (r - 1))                    return 1'b1;  // neg[r-1]
    if (g == 1 && s == 0 && col == 6)                    return 1'b1;  // neg3
    return 1'b0;
  endfunction

  function automatic int height(int g, int col);
    int h;
    h = 0;
    for (int s = 0; s < 4; s++) if (occupied(g, s, col)) h++;
    return h;
  endfunction

  // index of the j-th occupied slot of a column (0 if there is none)
  function automatic int nth_slot(int g, int col, int j);
    int n;
    n = 0;
    for (int s = 0; s < 4; s++)
      if (occupied(g, s, col)) begin
        if (n == j) return s;
        n++;
      end
    return 0;
  endfunction

  // Cell of each first-stage column, chosen from LSB to MSB so that every
  // column leaves at most two rows:
  //   a compressor chain ends in a full adder (two bits + chain carry),
  //   a half adder (one bit + chain carry) or a bare chain bit;
  //   outside a chain, columns that already fit in two rows pass through,
  //   two bits plus an incoming carry use a half adder, three or four bits
  //   use a compressor.
  localparam int C_PASS = 0, C_HA = 1, C_FA = 2, C_CMP = 3;

  function automatic int cell_of(int g, int col);
    int  ct, h;
    bit  chain, rin;
    chain = 1'b0;
    rin   = 1'b0;
    ct    = C_PASS;
    for (int c = 0; c <= col; c++) begin
      h = height(g, c);
      if (chain)                  ct = (h >= 3) ? C_CMP : (h == 2) ? C_FA : (h == 1) ? C_HA : C_PASS;
      else if (h + int'(rin) <= 2) ct = C_PASS;
      else if (h == 2)             ct = C_HA;
      else                         ct = C_CMP;
      chain = (ct == C_CMP);
      rin   = (ct != C_PASS);
    end
    return ct;
  endfunction

  // ---------------- rows placed into the slots ----------------
  logic [W-1:0] slot [2][4];
  logic [5:0]   r7_low;   // pp7[4:0] + neg7
  logic [5:0]   r7_c;

  // Row-7 increment by neg7: five half adders.
  assign r7_c[0] = neg[PP_ROWS-1];
  for (genvar j = 0; j < 5; j++) begin : g_inc
    half_add u_ha (.a(pp[PP_ROWS-1][j]), .b(r7_c[j]), .sum(r7_low[j]), .carry(r7_c[j+1]));
  end
  assign r7_low[5] = r7_c[5];

  always_comb begin
    for (int g = 0; g < 2; g++)
      for (int s = 0; s < 4; s++) slot[g][s] = '0;
    for (int r = 0; r < PP_ROWS; r++) begin
      logic [W-1:0] row;
      row = '0;
      row[2*r +: 16] = pp[r][15:0];
      if (r == 0) begin
        row[16] = pp[0][16];
        row[17] = pp[0][16];
        row[18] = ~pp[0][16];
      end else begin
        row[2*r+16] = ~pp[r][16];
        row[2*r+17] = 1'b1;
      end
      if (r == PP_ROWS-1) row[2*r +: 5] = r7_low[4:0];
      slot[r / 4][r % 4] = row;
    end
    // neg bits in the free slot of the next row
    slot[0][1][0]  = neg[0];
    slot[0][2][2]  = neg[1];
    slot[0][3][4]  = neg[2];
    slot[1][0][6]  = neg[3];
    slot[1][1][8]  = neg[4];
    slot[1][2][10] = neg[5];
    slot[1][3][12] = neg[6];
    // carry of the row-7 increment, free slot above row 0
    slot[0][0][19] = r7_low[5];
  end

  // ---------------- stage 1 ----------------
  // Each group leaves two inverted rows, st1_a_n and st1_b_n. Compressor
  // columns deliver comp42_inv outputs as they are; the half adders, full
  // adders and passed bits at the ends of a group are inverted here.
  logic [1:0][W-1:0] st1_a_n, st1_b_n;
  logic [1:0][W-1:0] ch_n;   // inverted compressor chain carry (1 = none)
  logic [1:0][W-1:0] vc_n;   // inverted vertical carry to the next column

  for (genvar g = 0; g < 2; g++) begin : g_grp
    for (genvar k = 0; k < W; k++) begin : g_col
      localparam int  CT  = cell_of(g, k);
      localparam int  H   = height(g, k);
      localparam bit  CH  = (k > 0) && (cell_of(g, k - 1) == C_CMP);
      localparam bit  RIN = (k > 0) && (cell_of(g, k - 1) != C_PASS);
      localparam int  KP  = (k > 0) ? k - 1 : 0;

      if (CT == C_CMP) begin : g_cmp
        logic sum_n, carry_n, cout_n;
        comp42_inv u_c (
          .i      ({slot[g][3][k], slot[g][2][k], slot[g][1][k], slot[g][0][k]}),
          .cin_n  (CH ? ch_n[g][KP] : 1'b1),
          .sum_n  (sum_n),
          .carry_n(carry_n),
          .cout_n (cout_n)
        );
        assign st1_a_n[g][k] = sum_n;
        assign st1_b_n[g][k] = RIN ? vc_n[g][KP] : 1'b1;
        assign vc_n[g][k]    = carry_n;
        assign ch_n[g][k]    = cout_n;
      end else if (CT == C_FA) begin : g_fa
        // two bits plus the chain carry, which drives the late cin input
        logic sum, carry;
        fa_mux u_fa (
          .a    (slot[g][nth_slot(g, k, 0)][k]),
          .b    (slot[g][nth_slot(g, k, 1)][k]),
          .cin  (~ch_n[g][KP]),
          .sum  (sum),
          .carry(carry)
        );
        assign st1_a_n[g][k] = ~sum;
        assign st1_b_n[g][k] = RIN ? vc_n[g][KP] : 1'b1;
        assign vc_n[g][k]    = ~carry;
        assign ch_n[g][k]    = 1'b1;
      end else if (CT == C_HA) begin : g_ha
        // one bit plus the chain carry, or two bits
        logic sum, carry;
        half_add u_ha (
          .a    (slot[g][nth_slot(g, k, 0)][k]),
          .b    (CH ? ~ch_n[g][KP] : slot[g][nth_slot(g, k, 1)][k]),
          .sum  (sum),
          .carry(carry)
        );
        assign st1_a_n[g][k] = ~sum;
        assign st1_b_n[g][k] = RIN ? vc_n[g][KP] : 1'b1;
        assign vc_n[g][k]    = ~carry;
        assign ch_n[g][k]    = 1'b1;
      end else begin : g_pass
        // at most two of: occupied bits, chain carry, vertical carry
        // present items, lowest first: bits, then chain, then vertical carry
        assign st1_a_n[g][k] = ~((H >= 1) ? slot[g][nth_slot(g, k, 0)][k]
                               : CH       ? ~ch_n[g][KP]
                               : RIN      ? ~vc_n[g][KP] : 1'b0);
        assign st1_b_n[g][k] = ~((H >= 2) ? slot[g][nth_slot(g, k, 1)][k]
                               : (H == 1) ? (CH ? ~ch_n[g][KP] : RIN ? ~vc_n[g][KP] : 1'b0)
                               : (CH && RIN) ? ~vc_n[g][KP] : 1'b0);
        assign vc_n[g][k]    = 1'b1;
        assign ch_n[g][k]    = 1'b1;
      end
    end
  end

  // ---------------- stage 2: comp42_prop, inverted inputs ----------------
  logic [W-1:0] s2_sum, s2_carry, s2_cout;

  for (genvar k = 0; k < W; k++) begin : g_st2
    comp42_prop u_c2 (
      .i_n  ({st1_b_n[1][k], st1_a_n[1][k], st1_b_n[0][k], st1_a_n[0][k]}),
      .cin  (k == 0 ? 1'b0 : s2_cout[(k == 0) ? 0 : k-1]),
      .sum  (s2_sum[k]),
      .carry(s2_carry[k]),
      .cout (s2_cout[k])
    );
  end

  // ---------------- two rows; low byte finished here ----------------
  logic [W-1:0] row_a, row_b;
  assign row_a = s2_sum;
  assign row_b = {s2_carry[W-2:0], 1'b0};

  ripple_add #(.W(LO_BITS)) u_lo (
    .a   (row_a[LO_BITS-1:0]),
    .b   (row_b[LO_BITS-1:0]),
    .cin (1'b0),
    .s   (lo),
    .cout(lo_cout)
  );

  assign row_s = row_a[W-1:LO_BITS];
  assign row_c = row_b[W-1:LO_BITS];

endmodule
