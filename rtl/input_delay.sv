// input_delay: the input register (IR) chain of the flattened-coefficient FIR.
//
// A shift register of ND sample registers.  taps[0] is the current input X^0
// itself (combinational), taps[k] is the input delayed k clock cycles (X^k in
// the block diagram).  Because the delayed samples are stored at input width
// rather than at accumulation width, moving delays from the accumulation chain
// into this chain is what saves flip-flops.  One sample enters per clock; the
// asynchronous active-low reset clears the chain (a design choice, the
// original describes no reset).
module input_delay
  import fir_pkg::*;
#(
  parameter int XW  = XW_DEF,  // sample width
  parameter int NDL = ND       // number of input registers
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [XW-1:0] x_in,
  output logic signed [XW-1:0] taps [NDL+1]
);
  logic signed [XW-1:0] ir [NDL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NDL; k++) ir[k] <= '0;
    end else begin
      ir[0] <= x_in;
      for (int k = 1; k < NDL; k++) ir[k] <= ir[k-1];
    end
  end

  always_comb begin
    taps[0] = x_in;
    for (int k = 1; k <= NDL; k++) taps[k] = ir[k-1];
  end
endmodule
