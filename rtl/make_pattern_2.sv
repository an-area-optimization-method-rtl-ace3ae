// make_pattern_2: level 1 of the shared pattern network.
//
// Holds the NL1 level-1 adders of the filter.  Adder i adds or subtracts two
// delayed inputs, each shifted left by a constant:
//   p2[i] = (X^L1_A[i] <<< L1_ASH[i]) +/- (X^L1_B[i] <<< L1_BSH[i]).
// Each adder is only as wide as its operands need (9 to 17 bits for 8-bit
// samples); its result is sign-extended to ACCW bits on the output bus.
// Which inputs, shifts and signs each adder uses comes from the structure
// table in fir_pkg.  Combinational.  The block and its role (two delayed
// inputs per adder) follow the original design; the table contents and the
// per-adder sizing rule are this design's own.
module make_pattern_2
  import fir_pkg::*;
#(
  parameter int XW   = XW_DEF,
  parameter int ACCW = ACCW_DEF
) (
  input  logic signed [XW-1:0]   taps [ND+1],
  output logic signed [ACCW-1:0] p2   [NL1]
);
  for (genvar i = 0; i < NL1; i++) begin : g_l1
    shift_add #(
      .AW (XW), .BW (XW),
      .ASH(L1_ASH[i]), .BSH(L1_BSH[i]), .SUB(L1_SUB[i] != 0),
      .OW (l1_width(i, XW)), .YW(ACCW)
    ) u_add (
      .a(taps[L1_A[i]]), .b(taps[L1_B[i]]), .y(p2[i])
    );
  end
endmodule
