// tb_accumulation_block: self-checking test of the accumulation chain.
// Every node of the bus gets a fresh random value each clock.  The expected
// output is rebuilt from the history of the bus: a pattern added at position
// p must appear at the output p+1 clocks later, shifted and signed as the
// table says.  Also checks that the output is zero after reset.
module tb_accumulation_block;
  import fir_pkg::*;
  localparam int ACCW = 19;
  localparam int HIST = NPOS + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ACCW-1:0] node [NNODE];
  logic signed [ACCW-1:0] y;
  int checks = 0, failures = 0;
  int hist [HIST][NNODE];   // hist[0] = values captured at the last edge
  int valid = 0;

  accumulation_block #(.ACCW(ACCW)) dut (.clk, .rst_n, .node, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NNODE; j++) node[j] = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y != 0) begin failures++; $display("output not cleared by reset"); end
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // values small enough that the 24-position sum of shifted terms fits
      for (int j = 0; j < NNODE; j++) node[j] = ACCW'(int'($urandom % 1024) - 512);
      @(posedge clk);
      for (int h = HIST - 1; h > 0; h--) hist[h] = hist[h-1];
      for (int j = 0; j < NNODE; j++) hist[0][j] = int'(node[j]);
      valid++;
      #1;
      if (valid >= NPOS) begin
        int e;
        e = 0;
        for (int p = 0; p < NPOS; p++) begin
          if (ACC_NODE[p] >= 0) begin
            int t;
            t = hist[p][ACC_NODE[p]] * (1 << ACC_SH[p]);
            e += (ACC_SUB[p] != 0) ? -t : t;
          end
        end
        checks++;
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("n=%0d: got %0d exp %0d", n, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
