// tb_make_pattern_2: self-checking test of the level-1 adders.
// Applies random and extreme (-128 / +127) delayed inputs and compares every
// level-1 output with the same shift-and-add evaluated in 32-bit integers,
// which cannot overflow, so a too-narrow adder or a wrong sign shows up.
module tb_make_pattern_2;
  import fir_pkg::*;
  localparam int XW = 8, ACCW = 19;
  logic signed [XW-1:0]   taps [ND+1];
  logic signed [ACCW-1:0] p2   [NL1];
  int checks = 0, failures = 0;

  make_pattern_2 #(.XW(XW), .ACCW(ACCW)) dut (.taps, .p2);

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
      end
      #1;
      for (int i = 0; i < NL1; i++) begin
        int a, b, e;
        a = int'(taps[L1_A[i]]) * (1 << L1_ASH[i]);
        b = int'(taps[L1_B[i]]) * (1 << L1_BSH[i]);
        e = (L1_SUB[i] != 0) ? a - b : a + b;
        checks++;
        if (int'(p2[i]) != e) begin
          failures++;
          if (failures < 10) $display("adder %0d: got %0d exp %0d", i, p2[i], e);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
