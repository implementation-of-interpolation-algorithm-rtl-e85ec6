// tb_freq_estimator: end-to-end test of the frequency estimator at its
// default size (256-point FFT, 8-bit samples, 1350 MHz sampling).
//
// Each frame is a tone of known frequency in the 750-1250 MHz band, sampled
// at 1350 MHz (band-pass sampling, second Nyquist zone), quantised to 8-bit
// offset binary with a random phase and +-1 LSB of noise. Frames:
//   - the single tones at 1000, 1100 and 1200 MHz, 200 ns pulses (270
//     samples, more than one 256-sample frame);
//   - a sweep 750..780 MHz in 0.5 MHz steps;
//   - random frequencies over the whole band, some with gaps in adc_valid.
// Per frame it checks, against values computed here in real arithmetic:
//   - the peak bin K equals the largest DFT bin of the samples in the window;
//   - alpha, beta, gamma are within 0.05 (plus the effect of 16 LSBs of FFT
//     rounding on small bins) of log2|X|^2 of bins K-1, K, K+1;
//   - p, K + p and both frequencies equal the fixed-point formulas applied to
//     the reported alpha, beta, gamma;
//   - the estimated frequency is within 1.6 MHz of the tone;
//   - the result comes a fixed number of clocks after start.
// Over the sweep the RMS error with interpolation must be below the RMS error
// of the coarse FFT frequency. Mechanisms counted, each must occur: a
// positive and a negative bin offset, a start ignored while a frame is in
// flight, a frame captured across gaps in adc_valid, and a frame captured
// while the previous one is still in the FFT read-out and back end.
module tb_freq_estimator;
  localparam int    N = 256, L = 8, ADC_W = 8;
  localparam real   FS = 1350.0;
  localparam real   PI = 3.14159265358979323846;
  localparam int    K_MIN = 142, K_MAX = 238;
  localparam int    LW = 14, PW = 10, FW = 16;
  localparam int    NW = LW + 1, PF = 8;
  localparam int    LATENCY = 3 * N + L + 32;   // capture, FFT flush and read-out, back end

  logic clk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_data;
  logic adc_valid, start, busy, res_valid, res_p_bad;
  logic [L-1:0] res_k;
  logic [LW-1:0] res_alpha, res_beta, res_gamma;
  logic signed [PW-1:0] res_p;
  logic [L+PF-1:0] res_est_bin;
  logic [FW-1:0] res_f_coarse, res_f_fine;
  int checks = 0, failures = 0;

  freq_estimator dut (.*);
  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #100000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int  x [N];
  int  n_pos = 0, n_neg = 0, n_ign = 0, n_gap = 0;
  real sw_c2 = 0.0, sw_f2 = 0.0; int sw_n = 0;
  real all_c2 = 0.0, all_f2 = 0.0; int all_n = 0;

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // log tolerance: table error plus up to 16 LSBs of FFT rounding error on |X|
  function automatic real ltol(real lg2);
    return 0.05 + 2.0 * 16.0 / (2.0 ** (lg2 / 2.0)) / $ln(2.0);
  endfunction

  function automatic real log2_bin(int k);
    real re, im;
    re = 0.0; im = 0.0;
    for (int n = 0; n < N; n++) begin
      re += x[n] * $cos(2.0 * PI * k * n / N);
      im -= x[n] * $sin(2.0 * PI * k * n / N);
    end
    return $ln(re * re + im * im) / $ln(2.0);
  endfunction

  task automatic frame(real f, bit gaps, bit sweep);
    real ph, lg [N], ea, eb, eg, fc, ff, errc, errf;
    int rk, qq, a, b, g, num, den, coarse, fine, pulse;
    longint t0;
    ph = $urandom_range(0, 999) / 1000.0 * 2.0 * PI;
    pulse = 270;                                      // 200 ns at 1350 MHz
    for (int n = 0; n < N; n++)
      x[n] = $rtoi($floor(90.0 * $cos(2.0 * PI * f / FS * n + ph) + 0.5)) + $urandom_range(0, 2) - 1;
    for (int k = K_MIN - 1; k <= K_MAX + 1; k++) lg[k] = log2_bin(k);
    rk = K_MIN;
    for (int k = K_MIN; k <= K_MAX; k++) if (lg[k] > lg[rk]) rk = k;

    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    t0 = cyc;                                         // posedge count at the edge that took start
    for (int n = 0; n < pulse; n++) begin
      if (gaps && $urandom_range(0, 3) == 0) begin
        adc_valid = 0; @(negedge clk);
        if (n < N) n_gap++;
      end
      adc_data  = ADC_W'((n < N ? x[n] : x[n - N]) + 128);
      adc_valid = 1;
      if (n == 40) start = 1;                          // must be ignored
      @(negedge clk);
      start = 0;
    end
    adc_valid = 0;
    if (!dut.u_latch.busy && busy) n_ign++;            // the second start did not re-arm
    while (!res_valid) @(negedge clk);
    if (!gaps) begin
      checks++;
      if (cyc - t0 != LATENCY) begin failures++; $display("FAIL latency %0d, expected %0d", cyc - t0, LATENCY); end
    end
    // peak and log magnitudes
    ea = res_alpha / 256.0; eb = res_beta / 256.0; eg = res_gamma / 256.0;
    checks++;
    if (int'(res_k) != rk || fabs(ea - lg[rk - 1]) > ltol(lg[rk - 1]) || fabs(eb - lg[rk]) > ltol(lg[rk]) || fabs(eg - lg[rk + 1]) > ltol(lg[rk + 1])) begin
      failures++;
      $display("FAIL f=%f K=%0d (%0d) logs %f %f %f exp %f %f %f", f, res_k, rk, ea, eb, eg, lg[rk - 1], lg[rk], lg[rk + 1]);
    end
    // fixed-point formulas on the reported values
    a = int'(res_alpha); b = int'(res_beta); g = int'(res_gamma);
    num = a - g; den = 2 * (2 * b - a - g);
    qq = (den <= 0) ? 0 : (num < 0 ? -((-num * 256) / den) : (num * 256) / den);
    coarse = (int'(res_k) * 1350 * 4) >>> L;
    fine   = coarse + ((-qq * 1350 * 4) >>> (L + PF));
    checks++;
    if (int'(res_p) != -qq || int'(res_est_bin) != int'(res_k) * 256 - qq ||
        int'(res_f_coarse) != coarse || int'(res_f_fine) != fine || res_p_bad != (den <= 0)) begin
      failures++;
      $display("FAIL f=%f p=%0d (%0d) coarse %0d (%0d) fine %0d (%0d)", f, res_p, -qq, res_f_coarse, coarse, res_f_fine, fine);
    end
    // accuracy
    fc = res_f_coarse / 4.0; ff = res_f_fine / 4.0;
    errc = fc - f; errf = ff - f;
    checks++;
    if (fabs(errf) > 1.6) begin failures++; $display("FAIL f=%f estimated %f coarse %f", f, ff, fc); end
    if (res_p > 0) n_pos++;
    if (res_p < 0) n_neg++;
    all_c2 += errc * errc; all_f2 += errf * errf; all_n++;
    if (sweep) begin sw_c2 += errc * errc; sw_f2 += errf * errf; sw_n++; end
    if (f == 1000.0 || f == 1100.0 || f == 1200.0)
      $display("tone %7.2f MHz: K=%0d coarse %7.2f MHz, p=%6.3f, estimated %7.2f MHz (logs %6.3f %6.3f %6.3f)",
               f, res_k, fc, res_p / 256.0, ff, ea, eb, eg);
  endtask

  // Two frames back to back: the second is captured while the first is still
  // read out of the FFT and processed. Both results must be right.
  int n_ovl = 0;
  task automatic overlapped(real fa, real fb);
    int xa [N], xb [N], ka, kb, got;
    real lg;
    for (int pass = 0; pass < 2; pass++) begin
      real f, ph, best;
      int kbest;
      f = pass == 0 ? fa : fb;
      ph = $urandom_range(0, 999) / 1000.0 * 2.0 * PI;
      for (int n = 0; n < N; n++)
        x[n] = $rtoi($floor(90.0 * $cos(2.0 * PI * f / FS * n + ph) + 0.5)) + $urandom_range(0, 2) - 1;
      kbest = K_MIN; best = -1.0;
      for (int k = K_MIN; k <= K_MAX; k++) begin lg = log2_bin(k); if (lg > best) begin best = lg; kbest = k; end end
      if (pass == 0) begin xa = x; ka = kbest; end else begin xb = x; kb = kbest; end
    end
    got = 0;
    fork
      begin
        for (int pass = 0; pass < 2; pass++) begin
          @(negedge clk);
          while (!dut.u_fft.in_ready || dut.u_latch.busy) @(negedge clk);
          start = 1; @(negedge clk); start = 0;
          if (pass == 1 && !res_valid && got == 0) n_ovl++;   // first result still outstanding
          for (int n = 0; n < N; n++) begin
            adc_data = ADC_W'((pass == 0 ? xa[n] : xb[n]) + 128); adc_valid = 1; @(negedge clk);
          end
          adc_valid = 0;
        end
      end
      begin
        while (got < 2) begin
          @(posedge clk); #1;
          if (res_valid) begin
            checks++;
            if (int'(res_k) != (got == 0 ? ka : kb)) begin
              failures++; $display("FAIL overlapped frame %0d: K=%0d expected %0d", got, res_k, got == 0 ? ka : kb);
            end
            got++;
          end
        end
      end
    join
  endtask

  initial begin
    real f;
    adc_data = 0; adc_valid = 0; start = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    frame(1000.0, 0, 0);
    frame(1100.0, 0, 0);
    frame(1200.0, 0, 0);
    for (int i = 0; i <= 60; i++) frame(750.0 + 0.5 * i, 0, 1);
    for (int i = 0; i < 30; i++) begin
      f = 752.0 + $urandom_range(0, 49600) / 100.0;
      frame(f, i % 3 == 0, 0);
    end
    for (int i = 0; i < 4; i++) overlapped(800.0 + 97.3 * i, 1240.0 - 101.7 * i);
    $display("sweep 750-780 MHz: RMS error coarse %f MHz, interpolated %f MHz", $sqrt(sw_c2 / sw_n), $sqrt(sw_f2 / sw_n));
    $display("all frames: RMS error coarse %f MHz, interpolated %f MHz", $sqrt(all_c2 / all_n), $sqrt(all_f2 / all_n));
    checks++;
    if (!($sqrt(sw_f2 / sw_n) < $sqrt(sw_c2 / sw_n))) begin failures++; $display("FAIL interpolation does not improve the sweep"); end
    $display("mechanisms: p>0 %0d, p<0 %0d, start ignored %0d, adc gaps %0d, overlapped frames %0d", n_pos, n_neg, n_ign, n_gap, n_ovl);
    checks++; if (n_ovl == 0) begin failures++; $display("FAIL no overlapped frame"); end
    checks++; if (n_pos == 0) begin failures++; $display("FAIL no positive offset"); end
    checks++; if (n_neg == 0) begin failures++; $display("FAIL no negative offset"); end
    checks++; if (n_ign == 0) begin failures++; $display("FAIL no ignored start"); end
    checks++; if (n_gap == 0) begin failures++; $display("FAIL no adc gaps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
