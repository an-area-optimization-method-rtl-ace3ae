// tb_flat_fir_response: frequency response of the 48-tap low-pass filter,
// measured on the hardware with quantised sine waves.
//
// For each test frequency f = k/N (N = 512 samples, so every tone falls on an
// exact DFT bin) the filter is fed an 8-bit sine of amplitude 100, allowed to
// settle for 64 samples, and its output is correlated with cos and sin over N
// samples.  The measured gain, normalised to the coefficient scale 2^10, is
// compared with |H(f)| computed here from the CSD coefficient terms, and with
// the specification of the design: passband (f <= 0.075) flat within 0.5 dB,
// stopband (f >= 0.125) at least 41.5 dB down.  Tones in each band are
// counted; a band that was never measured fails.
module tb_flat_fir_response;
  localparam int XW = 8, ACCW = 19, NT = 48, N = 512, SETTLE = 64;
  localparam real AMP = 100.0;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [XW-1:0]   x_in = '0;
  logic signed [ACCW-1:0] y_out;
  int checks = 0, failures = 0;
  int coef [NT];
  int n_pass = 0, n_stop = 0;
  // test tone_bin: passband 0.0195..0.0742, transition, stopband 0.125..0.498
  int tone_bin [12] = '{10, 20, 30, 38, 64, 80, 100, 120, 150, 190, 230, 255};

  flat_fir dut (.clk, .rst_n, .x_in, .y_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // |H(f)| of the scaled coefficients
  function automatic real mag_h(real f);
    real re = 0.0, im = 0.0;
    for (int i = 0; i < NT; i++) begin
      re += coef[i] * $cos(2.0 * PI * f * i);
      im -= coef[i] * $sin(2.0 * PI * f * i);
    end
    return $sqrt(re * re + im * im);
  endfunction

  initial begin
    real dc;
    build_coefs();
    dc = mag_h(0.0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (tone_bin[b]) begin
      real f, sc, ss, gain, gain_db, ref_gain;
      int n;
      f  = real'(tone_bin[b]) / real'(N);
      sc = 0.0;
      ss = 0.0;
      for (n = 0; n < SETTLE + N; n++) begin
        @(negedge clk);
        x_in = XW'($rtoi(AMP * $sin(2.0 * PI * f * n) + ((AMP * $sin(2.0 * PI * f * n) >= 0.0) ? 0.5 : -0.5)));
        @(posedge clk);
        #1;
        if (n >= SETTLE) begin
          sc += real'(y_out) * $cos(2.0 * PI * f * n);
          ss += real'(y_out) * $sin(2.0 * PI * f * n);
        end
      end
      // amplitude of the output tone, divided by the input amplitude
      gain     = 2.0 * $sqrt(sc * sc + ss * ss) / real'(N) / AMP;
      ref_gain = mag_h(f);
      gain_db  = 20.0 * $log10(gain / dc + 1.0e-12);
      $display("f=%0.4f gain=%0.2f dB (coefficients: %0.2f dB)", f, gain_db,
               20.0 * $log10(ref_gain / dc + 1.0e-12));
      // hardware against the coefficients: input rounding limits agreement
      checks++;
      if ((gain - ref_gain) > 0.002 * dc || (ref_gain - gain) > 0.002 * dc) begin
        failures++;
        $display("  measured gain differs from |H(f)|");
      end
      if (f <= 0.075) begin
        n_pass++;
        checks++;
        if (gain_db > 0.5 || gain_db < -0.5) begin failures++; $display("  passband out of range"); end
      end else if (f >= 0.125) begin
        n_stop++;
        checks++;
        if (gain_db > -41.5) begin failures++; $display("  stopband attenuation too small"); end
      end
    end
    $display("passband tones=%0d stopband tones=%0d", n_pass, n_stop);
    if (n_pass == 0) begin failures++; $display("no passband tone measured"); end
    if (n_stop == 0) begin failures++; $display("no stopband tone measured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
