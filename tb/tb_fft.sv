// tb_fft: checks the FFT against a direct DFT computed in real arithmetic.
// Frames: a pure tone, random samples, a full-scale DC frame and an impulse.
// Each bin must be within TOL LSBs of the reference (twiddle rounding), bins
// must come out in order 0..N-1 with out_last on the last, and the first bin
// must come exactly N + log2(N) clocks after the last sample (pipeline flush
// of N + log2(N) - 2 clocks, then the reorder buffer).
module tb_fft;
  localparam int N = 256, IW = 8, DW = 18, TW = 16, L = $clog2(N);
  localparam real TOL = 16.0;   // 2^-11 of full scale
  logic clk = 0, rst_n = 0;
  logic signed [IW-1:0] in_data;
  logic in_valid, in_ready;
  logic signed [DW-1:0] out_re, out_im;
  logic [L-1:0] out_idx;
  logic out_valid, out_last;
  int checks = 0, failures = 0;

  fft #(.N(N), .IW(IW), .DW(DW), .TW(TW)) dut (.*);
  always #5 clk = ~clk;

  int x [N];
  real ref_re [N], ref_im [N];
  longint cyc = 0;
  real emax = 0.0;
  always @(posedge clk) cyc++;

  initial begin
    #3000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic dft();
    for (int k = 0; k < N; k++) begin
      ref_re[k] = 0.0; ref_im[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        ref_re[k] += x[n] * $cos(2.0 * 3.14159265358979 * k * n / N);
        ref_im[k] -= x[n] * $sin(2.0 * 3.14159265358979 * k * n / N);
      end
    end
  endtask

  task automatic run(int kind);
    longint t_last, t_first;
    int k;
    real e;
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: x[n] = $rtoi($floor(100.0 * $cos(2.0 * 3.14159265358979 * 208.6 * n / N) + 0.5));
        1: x[n] = $urandom_range(0, 255) - 128;
        2: x[n] = -128;
        default: x[n] = (n == 5) ? 127 : 0;
      endcase
    end
    dft();
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    for (int n = 0; n < N; n++) begin
      in_data = IW'(x[n]); in_valid = 1; @(negedge clk);
      if (kind == 1 && n % 7 == 0) begin in_valid = 0; @(negedge clk); end  // gaps
    end
    in_valid = 0;
    t_last = cyc;                    // posedge count at the last accepted sample
    k = 0;
    while (k < N) begin
      @(posedge clk); #1;
      if (out_valid) begin
        if (k == 0) begin
          t_first = cyc;
          checks++;
          if (t_first - t_last != N + L) begin
            failures++; $display("FAIL latency %0d", t_first - t_last);
          end
        end
        checks++;
        if (out_idx != L'(k) || out_last != (k == N - 1)) begin
          failures++; $display("FAIL order idx=%0d k=%0d", out_idx, k);
        end
        e = $sqrt((out_re - ref_re[k]) ** 2 + (out_im - ref_im[k]) ** 2);
        if (e > emax) emax = e;
        checks++;
        if (e > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL kind %0d bin %0d got %0d,%0d ref %f,%f", kind, k, out_re, out_im, ref_re[k], ref_im[k]);
        end
        k++;
      end
    end
  endtask

  initial begin
    in_data = 0; in_valid = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    checks++; if (!in_ready) begin failures++; $display("FAIL not ready after reset"); end
    run(0); run(1); run(2); run(3);
    $display("largest bin error %f LSB", emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
