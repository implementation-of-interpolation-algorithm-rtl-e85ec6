// tb_published_cases: runs two measured peaks through the interpolation back
// end (diff_calc, denom_calc, divider, bin_estimate) at default widths.
//
// Case 1, a 1100 MHz pulse measured in hardware: peak bin 209 with log
// magnitudes 28.9414 (K-1), 31.5938 (K), 21.5820 (K+1) in units of 1/256.
// The reported results are 1102.00 MHz from the FFT alone, 1100.25 MHz
// interpolated, and an interpolated bin whose fraction is 0.7109; this back
// end must give exactly those numbers.
//
// Case 2, a 1200 MHz tone from a floating-point model: peak bin 228 with
// 65.1785, 67.0338, 56.7129 dB, shift -0.3476 bins and 1200.5106 MHz. The dB
// values are converted to log2|X|^2 (divided by 10*log10(2)); the offset does
// not depend on the log base. The fixed-point offset must be within 1/256 of
// -0.3476, the coarse frequency 1202.25 MHz (1202.34 truncated to 0.25 MHz)
// and the estimate within 0.5 MHz of 1200.5106.
module tb_published_cases;
  localparam int LW = 14, PF = 8, PW = 10, IDXW = 8;
  logic clk = 0, rst_n = 0;
  logic [LW-1:0] alpha, beta, gamma;
  logic [IDXW-1:0] k, k_out;
  logic go, num_valid, den_valid, busy, q_valid, den_bad, est_valid;
  logic signed [LW:0] num;
  logic signed [LW+2:0] den;
  logic signed [PW-1:0] q, p;
  logic [IDXW+PF-1:0] est_bin;
  logic [15:0] f_coarse, f_fine;
  int checks = 0, failures = 0;

  diff_calc  u_diff  (.clk, .rst_n, .alpha, .gamma, .in_valid(go), .num, .out_valid(num_valid));
  denom_calc u_denom (.clk, .rst_n, .alpha, .beta, .gamma, .in_valid(go), .den, .out_valid(den_valid));
  divider    u_div   (.clk, .rst_n, .num, .den, .start(num_valid && den_valid), .busy, .q, .den_bad, .out_valid(q_valid));
  bin_estimate u_est (.clk, .rst_n, .k, .q, .in_valid(q_valid), .k_out, .p, .est_bin, .f_coarse, .f_fine, .out_valid(est_valid));

  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int kk, int a, int b, int g);
    alpha = LW'(a); beta = LW'(b); gamma = LW'(g); k = IDXW'(kk); go = 1;
    @(negedge clk); go = 0;
    while (!est_valid) @(negedge clk);
  endtask

  function automatic int to_log2(real db);
    return $rtoi($floor(db / (10.0 * $log10(2.0)) * 256.0 + 0.5));
  endfunction

  initial begin
    real fc, ff, pp, frac;
    alpha = 0; beta = 0; gamma = 0; k = 0; go = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);

    run(209, 7409, 8088, 5525);          // 28.9414, 31.5938, 21.5820
    fc = f_coarse / 4.0; ff = f_fine / 4.0; frac = (est_bin % 256) / 256.0;
    $display("1100 MHz pulse: coarse %7.2f MHz, estimated %7.2f MHz, bin fraction %6.4f, p %7.4f", fc, ff, frac, p / 256.0);
    checks++; if (fc != 1102.00) begin failures++; $display("FAIL coarse"); end
    checks++; if (ff != 1100.25) begin failures++; $display("FAIL estimate"); end
    checks++; if (est_bin != 16'(208 * 256 + 182)) begin failures++; $display("FAIL bin fraction"); end

    run(228, to_log2(65.1785), to_log2(67.0338), to_log2(56.7129));
    fc = f_coarse / 4.0; ff = f_fine / 4.0; pp = p / 256.0;
    $display("1200 MHz tone: coarse %7.2f MHz, estimated %7.2f MHz, p %7.4f", fc, ff, pp);
    checks++; if (pp < -0.3476 - 1.0 / 256 || pp > -0.3476 + 1.0 / 256) begin failures++; $display("FAIL offset"); end
    checks++; if (fc != 1202.25) begin failures++; $display("FAIL coarse"); end
    checks++; if (ff < 1200.0106 || ff > 1201.0106) begin failures++; $display("FAIL estimate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
