// tb_flat_fir: end-to-end test of the 48-tap filter at its default sizes.
//
// The reference is a plain direct-form convolution with the coefficients of
// the low-pass design, rebuilt here from their signed-power-of-two terms
// (C_0..C_23, mirrored for C_24..C_47) and scaled by 2^10.  It shares nothing
// with the pattern table of the filter, so any grouping, shift, sign or width
// error shows.  After each clock the output must equal
//   y[n] = sum_i C_i * x[n-i]   (x[n] = sample presented before that clock),
// i.e. one clock of latency and one sample per clock.  Phases:
//   impulse  : +1 and -128 impulses, the whole impulse response tap by tap
//   extreme  : inputs whose signs match the coefficients, driving the output
//              to its largest positive and negative values (the full 19-bit
//              range, no overflow allowed)
//   random   : random samples
//   reset    : reset in the middle of a stream clears all registers
// Each phase counts how often it happened; a phase that never ran fails.
module tb_flat_fir;
  localparam int XW = 8, ACCW = 19, NT = 48;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [XW-1:0]   x_in = '0;
  logic signed [ACCW-1:0] y_out;
  int checks = 0, failures = 0;
  int coef [NT];
  int xh [NT];
  int n_impulse = 0, n_extreme_pos = 0, n_extreme_neg = 0, n_random = 0, n_reset = 0;

  flat_fir dut (.clk, .rst_n, .x_in, .y_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Add sign * 2^-e (scaled by 2^10) to coefficient i and its mirror.
  function automatic void term(int i, int e, int s);
    coef[i]          += s * (1 << (10 - e));
    coef[NT - 1 - i] += s * (1 << (10 - e));
  endfunction

  task automatic build_coefs();
    for (int i = 0; i < NT; i++) coef[i] = 0;
    term(0, 9, 1);
    term(1, 8, 1);  term(1, 10, 1);
    term(2, 9, 1);
    term(3, 9, 1);
    term(4, 9, -1);
    term(5, 8, -1); term(5, 10, -1);
    term(6, 7, -1);
    term(7, 7, -1); term(7, 10, 1);
    term(8, 8, -1); term(8, 10, 1);
    term(9, 8, 1);
    term(10, 6, 1); term(10, 8, -1);
    term(11, 6, 1); term(11, 10, 1);
    term(12, 6, 1);
    term(13, 7, 1); term(13, 10, -1);
    term(14, 7, -1);
    term(15, 5, -1); term(15, 7, 1); term(15, 9, -1);
    term(16, 5, -1); term(16, 7, -1); term(16, 9, 1);
    term(17, 5, -1); term(17, 8, -1);
    term(18, 6, -1); term(18, 10, -1);
    term(19, 6, 1); term(19, 8, 1); term(19, 10, 1);
    term(20, 4, 1); term(20, 7, 1); term(20, 10, 1);
    term(21, 3, 1);
    term(22, 2, 1); term(22, 4, -1); term(22, 6, -1); term(22, 10, -1);
    term(23, 2, 1); term(23, 4, -1); term(23, 7, 1); term(23, 10, 1);
  endtask

  function automatic int expected();
    int s = 0;
    for (int i = 0; i < NT; i++) s += coef[i] * xh[i];
    return s;
  endfunction

  // Present one sample, clock it, compare the output.
  task automatic step(int x, string phase);
    int e;
    @(negedge clk);
    x_in = XW'(x);
    for (int i = NT - 1; i > 0; i--) xh[i] = xh[i-1];
    xh[0] = int'(x_in);
    @(posedge clk);
    #1;
    e = expected();
    checks++;
    if (int'(y_out) != e) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", phase, y_out, e);
    end
    if (e >= (1 << (ACCW - 2))) n_extreme_pos++;
    if (e < -(1 << (ACCW - 2))) n_extreme_neg++;
  endtask

  task automatic clear_hist();
    for (int i = 0; i < NT; i++) xh[i] = 0;
  endtask

  initial begin
    int sgn;
    build_coefs();
    clear_hist();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // impulse responses
    step(1, "impulse");
    for (int i = 1; i < NT + 2; i++) step(0, "impulse");
    n_impulse++;
    step(-128, "impulse");
    for (int i = 1; i < NT + 2; i++) step(0, "impulse");
    n_impulse++;

    // extreme positive, then extreme negative output
    for (sgn = 1; sgn >= -1; sgn -= 2) begin
      for (int i = NT - 1; i >= 0; i--) begin
        int v;
        if (coef[i] * sgn > 0) v = 127; else if (coef[i] * sgn < 0) v = -128; else v = 0;
        step(v, "extreme");
      end
      for (int i = 0; i < NT; i++) step(0, "extreme");
    end

    // random stream
    for (int n = 0; n < 3000; n++) begin
      step(int'($urandom % 256) - 128, "random");
      n_random++;
    end

    // reset in the middle of a stream
    @(negedge clk);
    rst_n = 1'b0;
    x_in  = '0;
    #1;
    checks++;
    if (y_out != 0) begin failures++; $display("reset: output not cleared"); end
    clear_hist();
    n_reset++;
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 100; n++) step(int'($urandom % 256) - 128, "after reset");

    $display("impulse=%0d extreme_pos=%0d extreme_neg=%0d random=%0d reset=%0d",
             n_impulse, n_extreme_pos, n_extreme_neg, n_random, n_reset);
    if (n_impulse == 0)     begin failures++; $display("impulse phase never ran"); end
    if (n_extreme_pos == 0) begin failures++; $display("largest positive output never reached"); end
    if (n_extreme_neg == 0) begin failures++; $display("largest negative output never reached"); end
    if (n_random == 0)      begin failures++; $display("random phase never ran"); end
    if (n_reset == 0)       begin failures++; $display("reset phase never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
