// make_pattern_4: level 2 of the shared pattern network.
//
// Holds the NL2 level-2 adders.  Adder i combines two level-1 results (or a
// level-1 result and a single delayed input, for three-term patterns):
//   p4[i] = (node[L2_A[i]] <<< L2_ASH[i]) +/- (node[L2_B[i]] <<< L2_BSH[i]),
// which yields a pattern of up to four nonzero coefficient terms with a logic
// depth of two adders.  Each adder is sized from its operand widths (10 to 18
// bits for 8-bit samples) and sign-extended to ACCW bits.  Combinational.
// The block and its role follow the original design; allowing a delayed
// input as an operand and the table contents are this design's own.
module make_pattern_4
  import fir_pkg::*;
#(
  parameter int XW   = XW_DEF,
  parameter int ACCW = ACCW_DEF
) (
  input  logic signed [XW-1:0]   taps [ND+1],
  input  logic signed [ACCW-1:0] p2   [NL1],
  output logic signed [ACCW-1:0] p4   [NL2]
);
  // Operand of a level-2 adder: a delayed input or a level-1 result.
  logic signed [ACCW-1:0] low [ND+1+NL1];

  always_comb begin
    for (int k = 0; k <= ND; k++) low[k] = ACCW'(taps[k]);
    for (int k = 0; k < NL1; k++) low[ND+1+k] = p2[k];
  end

  for (genvar i = 0; i < NL2; i++) begin : g_l2
    localparam int WA = low_width(L2_A[i], XW);
    localparam int WB = low_width(L2_B[i], XW);
    shift_add #(
      .AW (WA), .BW (WB),
      .ASH(L2_ASH[i]), .BSH(L2_BSH[i]), .SUB(L2_SUB[i] != 0),
      .OW (l2_width(i, XW)), .YW(ACCW)
    ) u_add (
      .a(WA'(low[L2_A[i]])), .b(WB'(low[L2_B[i]])), .y(p4[i])
    );
  end
endmodule
