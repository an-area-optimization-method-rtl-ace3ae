// fir_pkg: sizes and structure table of the 48-tap flattened-coefficient FIR filter.
//
// The filter computes y[n] = sum_{i=0}^{47} C_i * x[n-1-i] with the symmetric
// low-pass coefficients C_0..C_23 (C_47-i = C_i) of the Table-1 design, written
// in canonical signed digit form with exponents 2^-2 .. 2^-10.  All arithmetic is
// integer: the coefficients are scaled by 2^10, so the output is exact (no
// rounding) and equals the fractional result times 1024.
//
// Instead of one constant multiplier per tap, the 94 nonzero CSD terms are
// grouped into "patterns" of at most four terms.  A pattern reads delayed inputs
// X^d (d = 0..ND) and is summed with a two-level shift-add tree: level 1
// (make_pattern_2) adds two shifted delayed inputs, level 2 (make_pattern_4)
// adds two level-1 results.  Each of the NPOS accumulation positions of the
// transposed-form chain adds exactly one pattern, shifted and signed; a tap n
// reached by a pattern input d placed at position p satisfies n = p + d
// (X^-n = X^-d Z^-(n-d)).  A pattern whose value is needed at several positions
// is computed once and fanned out: this is the adder sharing.
//
// Node numbering used by the tables below:
//   0 .. ND                      delayed inputs X^0 .. X^ND
//   ND+1 .. ND+NL1               level-1 adders (make_pattern_2)
//   ND+NL1+1 .. ND+NL1+NL2       level-2 adders (make_pattern_4)
// A level-k adder computes  (A <<< ASH) + (B <<< BSH)  or, when SUB is 1,
// (A <<< ASH) - (B <<< BSH).  Accumulation position p adds (or, ACC_SUB=1,
// subtracts) node ACC_NODE[p] shifted left by ACC_SH[p].
//
// The grouping follows the two-step method of the design: first search
// four-term patterns that occur several times in the CSD coefficient matrix and
// place each at positions whose spacing equals the tap spacing of its
// occurrences, without two patterns on one position; then pack the remaining
// terms, at most four per free position.  A local search that moves single
// terms between positions (keeping every tap within reach of the input chain)
// then minimised the number of distinct pattern adders, with identical
// level-1 pairs shared.  The published design uses the same method but does
// not list its grouping, so this table is this design's own result: 19
// level-1 and 14 level-2 adders, 56 adders in all with the 23 accumulation
// adders.
package fir_pkg;

  localparam int XW_DEF   = 8;    // input sample width
  localparam int ACCW_DEF = 19;   // accumulation width
  localparam int NTAPS    = 48;   // filter length
  localparam int ND       = 27;   // input registers: taps X^0 .. X^27
  localparam int NPOS     = 24;   // accumulation positions (registers)
  localparam int CFRAC    = 10;   // coefficient scale 2^10

  localparam int NL1 = 19;
  localparam int NL2 = 14;
  localparam int L1_A [19] = '{2, 0, 14, 0, 3, 4, 0, 14, 1, 19, 15, 16, 1, 8, 22, 7, 25, 22, 21};
  localparam int L1_ASH [19] = '{1, 1, 2, 1, 0, 0, 0, 0, 0, 4, 1, 0, 0, 0, 0, 5, 1, 1, 0};
  localparam int L1_B [19] = '{27, 1, 15, 14, 14, 7, 3, 18, 3, 23, 20, 18, 15, 14, 27, 25, 26, 24, 22};
  localparam int L1_BSH [19] = '{0, 0, 0, 0, 1, 1, 2, 0, 0, 0, 0, 0, 4, 8, 0, 0, 0, 0, 1};
  localparam int L1_SUB [19] = '{0, 0, 0, 1, 0, 1, 1, 0, 1, 0, 1, 1, 0, 0, 1, 1, 0, 1, 0};
  localparam int L2_A [14] = '{28, 30, 32, 34, 35, 37, 35, 1, 39, 32, 39, 43, 45, 46};
  localparam int L2_ASH [14] = '{0, 0, 2, 0, 0, 4, 1, 0, 4, 3, 2, 0, 1, 0};
  localparam int L2_B [14] = '{29, 31, 28, 33, 36, 30, 3, 38, 40, 41, 42, 38, 44, 44};
  localparam int L2_BSH [14] = '{0, 0, 0, 2, 0, 0, 0, 3, 0, 0, 0, 1, 0, 1};
  localparam int L2_SUB [14] = '{0, 0, 0, 1, 0, 0, 0, 1, 0, 1, 1, 1, 1, 1};
  localparam int ACC_NODE [24] = '{47, 48, 49, 50, 51, 52, 53, 54, 50, 55, 51, 56, 57, 50, 58, 58, 58, 48, 48, 50, 59, 60, 51, 48};
  localparam int ACC_SH [24] = '{0, 1, 0, 1, 0, 0, 2, 0, 2, 2, 0, 0, 0, 3, 2, 3, 3, 1, 3, 4, 0, 0, 0, 2};
  localparam int ACC_SUB [24] = '{0, 0, 1, 0, 1, 0, 0, 0, 1, 1, 0, 1, 0, 0, 0, 0, 0, 1, 1, 0, 1, 1, 0, 0};
  // Integer coefficients C_i * 2^10, for reference and for checking.
  localparam int COEF [48] = '{2, 5, 2, 2, -2, -5, -8, -7, -3, 4, 12, 17, 16, 7, -8, -26, -38, -36, -17, 21, 73, 128, 175, 201, 201, 175, 128, 73, 21, -17, -36, -38, -26, -8, 7, 16, 17, 12, 4, -3, -7, -8, -5, -2, 2, 2, 5, 2};

  localparam int NNODE = ND + 1 + NL1 + NL2;

  // Width of a level-1 adder result: wide enough for both shifted operands
  // plus one carry bit (9 to 17 bits for 8-bit inputs in this table).
  function automatic int l1_width(int i, int xw);
    int wa, wb;
    wa = xw + L1_ASH[i];
    wb = xw + L1_BSH[i];
    return ((wa > wb) ? wa : wb) + 1;
  endfunction

  // Width of a node that may feed a level-2 adder (a delayed input or a
  // level-1 result).
  function automatic int low_width(int id, int xw);
    if (id <= ND) return xw;
    return l1_width(id - ND - 1, xw);
  endfunction

  // Width of a level-2 adder result.
  function automatic int l2_width(int i, int xw);
    int wa, wb;
    wa = low_width(L2_A[i], xw) + L2_ASH[i];
    wb = low_width(L2_B[i], xw) + L2_BSH[i];
    return ((wa > wb) ? wa : wb) + 1;
  endfunction

endpackage
