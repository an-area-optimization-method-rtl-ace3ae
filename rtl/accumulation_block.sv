// accumulation_block: the transposed-form accumulation chain.
//
// NPOS accumulation registers (RA) and NPOS-1 accumulation adders (AA), all
// ACCW bits wide.  Position p takes one pattern value, node[ACC_NODE[p]]
// shifted left by ACC_SH[p], and adds it to (or, ACC_SUB[p] = 1, subtracts it
// from) the value arriving from position p+1:
//   ra[NPOS-1] <= +/- pattern[NPOS-1]
//   ra[p]      <= ra[p+1] +/- pattern[p]          p = NPOS-2 .. 0
//   y           = ra[0]
// A pattern placed at position p therefore reaches the output p+1 cycles
// later.  One pattern per position keeps every accumulation adder at two
// operands, so the critical path is two pattern adders plus one accumulation
// adder.  The register and adder counts follow the original design; the
// registered output, the reset that clears the chain and the placement of
// each pattern (from fir_pkg) are this design's own.
module accumulation_block
  import fir_pkg::*;
#(
  parameter int ACCW = ACCW_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [ACCW-1:0] node [NNODE],
  output logic signed [ACCW-1:0] y
);
  logic signed [ACCW-1:0] ra   [NPOS];
  logic signed [ACCW-1:0] nxt  [NPOS];
  logic signed [ACCW-1:0] pat  [NPOS];

  always_comb begin
    for (int p = 0; p < NPOS; p++) begin
      pat[p] = (ACC_NODE[p] < 0) ? '0 : (node[(ACC_NODE[p] < 0) ? 0 : ACC_NODE[p]] <<< ACC_SH[p]);
      if (p == NPOS - 1) nxt[p] = (ACC_SUB[p] != 0) ? -pat[p] : pat[p];
      else               nxt[p] = (ACC_SUB[p] != 0) ? ra[p+1] - pat[p] : ra[p+1] + pat[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPOS; p++) ra[p] <= '0;
    end else begin
      for (int p = 0; p < NPOS; p++) ra[p] <= nxt[p];
    end
  end

  assign y = ra[0];
endmodule
