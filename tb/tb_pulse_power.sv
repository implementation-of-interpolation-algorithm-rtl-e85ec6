// tb_pulse_power: estimator accuracy over signal level and pulse width, at the
// default size (256-point FFT, 1350 MHz sampling).
//
// Tones at random frequencies in 750-1250 MHz are sent at four amplitudes
// (4, 16, 64 and 120 LSB peak, with +-1 LSB of noise) and three pulse widths:
// 200 ns (fills the 256-sample frame), 150 ns and 100 ns (the rest of the
// frame holds only noise). For every frame the peak bin must be within one
// bin of the tone. For the full-length pulses of 16 LSB and more, the estimate
// must be within 1.6 MHz of the tone. For each case the testbench prints the
// RMS error of the coarse and of the interpolated frequency. Interpolation
// must lower the RMS error for every full-length case.
module tb_pulse_power;
  localparam int  N = 256, ADC_W = 8;
  localparam real FS = 1350.0;
  localparam real PI = 3.14159265358979323846;
  localparam int  FRAMES = 12;

  logic clk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_data;
  logic adc_valid, start, busy, res_valid, res_p_bad;
  logic [7:0] res_k;
  logic [13:0] res_alpha, res_beta, res_gamma;
  logic signed [9:0] res_p;
  logic [15:0] res_est_bin, res_f_coarse, res_f_fine;
  int checks = 0, failures = 0;

  freq_estimator dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic frame(real f, real amp, int pulse, output real errc, output real errf);
    real ph, kt;
    int s;
    ph = $urandom_range(0, 999) / 1000.0 * 2.0 * PI;
    @(negedge clk);
    while (busy) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    for (int n = 0; n < N; n++) begin
      s = (n < pulse) ? $rtoi($floor(amp * $cos(2.0 * PI * f / FS * n + ph) + 0.5)) : 0;
      s += $urandom_range(0, 2) - 1;
      adc_data = ADC_W'(s + 128); adc_valid = 1; @(negedge clk);
    end
    adc_valid = 0;
    while (!res_valid) @(negedge clk);
    kt = f / FS * N;
    checks++;
    if (fabs(real'(res_k) - kt) > 1.0) begin
      failures++; $display("FAIL f=%f amp=%f pulse=%0d: K=%0d, tone at bin %f", f, amp, pulse, res_k, kt);
    end
    errc = res_f_coarse / 4.0 - f;
    errf = res_f_fine / 4.0 - f;
  endtask

  initial begin
    real amps [4] = '{4.0, 16.0, 64.0, 120.0};
    int  pulses [3] = '{270, 203, 135};          // 200, 150, 100 ns at 1350 MHz
    real f, ec, ef, sc, sf;
    adc_data = 128; adc_valid = 0; start = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (pulses[pi]) begin
      foreach (amps[ai]) begin
        sc = 0.0; sf = 0.0;
        for (int i = 0; i < FRAMES; i++) begin
          f = 752.0 + $urandom_range(0, 49600) / 100.0;
          frame(f, amps[ai], pulses[pi] > N ? N : pulses[pi], ec, ef);
          sc += ec * ec; sf += ef * ef;
          if (pulses[pi] >= N && amps[ai] >= 16.0) begin
            checks++;
            if (fabs(ef) > 1.6) begin failures++; $display("FAIL f=%f amp=%f: estimate off by %f MHz", f, amps[ai], ef); end
          end
        end
        $display("pulse %3.0f ns, amplitude %5.1f LSB: RMS error coarse %5.3f MHz, interpolated %5.3f MHz",
                 pulses[pi] / FS * 1000.0, amps[ai], $sqrt(sc / FRAMES), $sqrt(sf / FRAMES));
        if (pulses[pi] >= N) begin
          checks++;
          if (!(sf < sc)) begin failures++; $display("FAIL interpolation does not help at amplitude %f", amps[ai]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
