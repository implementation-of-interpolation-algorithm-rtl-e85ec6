// tb_peak_detect: checks the peak search against a reference search.
// Sends frames of 256 log values: random spectra, a tone-like spectrum, a
// larger value outside the search window, a peak on each window edge and
// equal maxima. The reference finds the first largest value in K_MIN..K_MAX
// and takes its neighbours. Also checks that the result comes one clock after
// the last bin and holds until the next frame's result.
module tb_peak_detect;
  localparam int LW = 14, IDXW = 8, N = 256, K_MIN = 142, K_MAX = 238;
  logic clk = 0, rst_n = 0;
  logic [LW-1:0] in_log, alpha, beta, gamma;
  logic [IDXW-1:0] in_idx, k;
  logic in_valid, in_last, out_valid;
  int checks = 0, failures = 0;

  peak_detect #(.LW(LW), .IDXW(IDXW), .K_MIN(K_MIN), .K_MAX(K_MAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int v [N];

  task automatic frame(int kind);
    int rk, pk;
    case (kind)
      0: for (int i = 0; i < N; i++) v[i] = $urandom_range(0, (1 << LW) - 1);
      1: begin
           pk = $urandom_range(K_MIN, K_MAX);
           for (int i = 0; i < N; i++) v[i] = 2000 + $urandom_range(0, 300);
           v[pk] = 9000; v[pk - 1] = 8000 + $urandom_range(0, 999); v[pk + 1] = 8000 + $urandom_range(0, 999);
         end
      2: begin
           for (int i = 0; i < N; i++) v[i] = $urandom_range(0, 5000);
           v[20] = 16000; v[K_MIN - 1] = 15000; v[K_MAX + 1] = 15500;   // outside the window
           v[150] = 7000;
         end
      3: begin for (int i = 0; i < N; i++) v[i] = 100; v[K_MIN] = 6000; v[K_MIN - 1] = 7000; end
      4: begin for (int i = 0; i < N; i++) v[i] = 100; v[K_MAX] = 6000; v[K_MAX + 1] = 300; end
      default: begin for (int i = 0; i < N; i++) v[i] = 100; v[170] = 5000; v[190] = 5000; v[191] = 77; end
    endcase
    rk = K_MIN;
    for (int i = K_MIN; i <= K_MAX; i++) if (v[i] > v[rk]) rk = i;
    for (int i = 0; i < N; i++) begin
      in_log = LW'(v[i]); in_idx = IDXW'(i); in_last = (i == N - 1); in_valid = 1;
      @(negedge clk);
      if (i == 100) begin in_valid = 0; @(negedge clk); end
      if (i < N - 1 && i > 0) begin
        checks++;
        if (out_valid) begin failures++; $display("FAIL early out_valid"); end
      end
    end
    in_valid = 0;
    // the result was registered at the posedge after the last bin
    checks++;
    if (!out_valid || k != IDXW'(rk) || alpha != LW'(v[rk - 1]) || beta != LW'(v[rk]) || gamma != LW'(v[rk + 1])) begin
      failures++;
      $display("FAIL kind %0d: valid=%b k=%0d (%0d) a=%0d b=%0d g=%0d exp %0d %0d %0d", kind, out_valid, k, rk,
               alpha, beta, gamma, v[rk - 1], v[rk], v[rk + 1]);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid || k != IDXW'(rk) || beta != LW'(v[rk])) begin failures++; $display("FAIL result not held"); end
  endtask

  initial begin
    in_log = 0; in_idx = 0; in_valid = 0; in_last = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 40; f++) frame(f % 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
