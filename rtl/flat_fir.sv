// flat_fir: 48-tap multiplierless FIR low-pass filter in a hybrid
// direct/transposed form (flattened coefficients with shared shift-add
// patterns).
//
//   x_in --> input_delay --taps X^0..X^27--> make_pattern_2 --> make_pattern_4
//                 |                               |                  |
//                 +-------------- node bus -------+------------------+
//                                     |
//                             accumulation_block --> y_out
//
// y_out[n] = sum_{i=0}^{47} C_i * 2^10 * x_in[n-1-i]: the exact (unrounded)
// response with the coefficients scaled by 2^10, one sample per clock, one
// clock of latency (the last accumulation register).  8-bit signed input,
// 19-bit signed output; for any 8-bit input sequence |y_out| <= 208640, so
// the 19-bit accumulation never overflows.  Part of the delay of a
// conventional transposed-form filter is moved from the wide accumulation
// chain (24 registers of 19 bits) to the narrow input chain (27 registers
// of 8 bits), and every accumulation position receives one pattern of up to
// four coefficient terms built with at most two adder levels.  Sizes, block
// split and coefficients follow the original design; the grouping table in
// fir_pkg, the reset and the output latency are this implementation's.
module flat_fir
  import fir_pkg::*;
#(
  parameter int XW   = XW_DEF,    // input sample width
  parameter int ACCW = ACCW_DEF   // accumulation / output width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [XW-1:0]   x_in,
  output logic signed [ACCW-1:0] y_out
);
  logic signed [XW-1:0]   taps [ND+1];
  logic signed [ACCW-1:0] p2   [NL1];
  logic signed [ACCW-1:0] p4   [NL2];
  logic signed [ACCW-1:0] node [NNODE];

  input_delay #(.XW(XW), .NDL(ND)) u_input_delay (
    .clk, .rst_n, .x_in, .taps
  );

  make_pattern_2 #(.XW(XW), .ACCW(ACCW)) u_make_pattern_2 (
    .taps, .p2
  );

  make_pattern_4 #(.XW(XW), .ACCW(ACCW)) u_make_pattern_4 (
    .taps, .p2, .p4
  );

  always_comb begin
    for (int k = 0; k <= ND; k++) node[k] = ACCW'(taps[k]);
    for (int k = 0; k < NL1; k++) node[ND+1+k] = p2[k];
    for (int k = 0; k < NL2; k++) node[ND+1+NL1+k] = p4[k];
  end

  accumulation_block #(.ACCW(ACCW)) u_accumulation_block (
    .clk, .rst_n, .node, .y(y_out)
  );
endmodule
