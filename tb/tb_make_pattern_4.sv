// tb_make_pattern_4: self-checking test of the level-2 adders.
// The level-1 values fed to the block are computed here from random or
// extreme delayed inputs; every level-2 output is compared with the pattern
// evaluated in 32-bit integers.
module tb_make_pattern_4;
  import fir_pkg::*;
  localparam int XW = 8, ACCW = 19;
  logic signed [XW-1:0]   taps [ND+1];
  logic signed [ACCW-1:0] p2   [NL1];
  logic signed [ACCW-1:0] p4   [NL2];
  int checks = 0, failures = 0;
  int lowv [ND+1+NL1];

  make_pattern_4 #(.XW(XW), .ACCW(ACCW)) dut (.taps, .p2, .p4);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k <= ND; k++) begin
        case (n % 4)
          0: taps[k] = XW'($urandom);
          1: taps[k] = -8'sd128;
          2: taps[k] = 8'sd127;
          default: taps[k] = ($urandom % 2) ? -8'sd128 : 8'sd127;
        endcase
        lowv[k] = int'(taps[k]);
      end
      for (int i = 0; i < NL1; i++) begin
        int a, b;
        a = int'(taps[L1_A[i]]) * (1 << L1_ASH[i]);
        b = int'(taps[L1_B[i]]) * (1 << L1_BSH[i]);
        lowv[ND+1+i] = (L1_SUB[i] != 0) ? a - b : a + b;
        p2[i] = ACCW'(lowv[ND+1+i]);
      end
      #1;
      for (int i = 0; i < NL2; i++) begin
        int a, b, e;
        a = lowv[L2_A[i]] * (1 << L2_ASH[i]);
        b = lowv[L2_B[i]] * (1 << L2_BSH[i]);
        e = (L2_SUB[i] != 0) ? a - b : a + b;
        checks++;
        if (int'(p4[i]) != e) begin
          failures++;
          if (failures < 10) $display("adder %0d: got %0d exp %0d", i, p4[i], e);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
