// tb_input_delay: self-checking test of the input register chain.
// Drives random samples, one per clock, and checks that taps[k] equals the
// sample presented k clocks earlier (taps[0] is the current input), including
// the all-zero state right after reset.
module tb_input_delay;
  import fir_pkg::*;
  localparam int XW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [XW-1:0] x_in = '0;
  logic signed [XW-1:0] taps [ND+1];
  int checks = 0, failures = 0;
  int hist [ND+1];

  input_delay #(.XW(XW), .NDL(ND)) dut (.clk, .rst_n, .x_in, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= ND; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      x_in = XW'($urandom);
      for (int k = ND; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x_in);
      #1;
      for (int k = 0; k <= ND; k++) begin
        checks++;
        if (int'(taps[k]) != hist[k]) begin
          failures++;
          if (failures < 10) $display("n=%0d tap %0d: got %0d exp %0d", n, k, taps[k], hist[k]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
