// shift_add: one two-operand adder of the pattern network.
//
// Computes y = (a <<< ASH) + (b <<< BSH), or (a <<< ASH) - (b <<< BSH) when SUB
// is 1, on signed operands.  This is the single adder used at level 1 and level
// 2 of the pattern trees; shifts are wiring only.  The adder works at its own
// width OW (the caller sizes it so the result never overflows) and the result
// is sign-extended to the YW-bit output bus.  Purely combinational.  Sizing
// each adder to its operands mirrors the adder-width analysis of the original
// design; the module itself is a helper of this implementation.
module shift_add #(
  parameter int AW  = 8,    // width of operand a
  parameter int BW  = 8,    // width of operand b
  parameter int ASH = 0,    // left shift of a
  parameter int BSH = 0,    // left shift of b
  parameter bit SUB = 1'b0, // 1: subtract b
  parameter int OW  = 9,    // adder width
  parameter int YW  = 19    // output bus width (>= OW)
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic signed [YW-1:0] y
);
  logic signed [OW-1:0] as, bs, sum;

  always_comb begin
    as  = OW'(a) <<< ASH;
    bs  = OW'(b) <<< BSH;
    sum = SUB ? (as - bs) : (as + bs);
    y   = YW'(sum);
  end
endmodule
