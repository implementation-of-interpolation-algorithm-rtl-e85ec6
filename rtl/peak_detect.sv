// peak_detect: finds the peak bin K and the log magnitudes around it.
//
// The log magnitudes of one FFT frame arrive in bin order, one per clock.
// Among the bins K_MIN..K_MAX the largest value is the peak beta at bin K; the
// values of bins K-1 and K+1 are kept as alpha and gamma. The search is done on
// the fly without storing the spectrum: the previous bin's value is always
// held, so when a new maximum appears its left neighbour is known, and the
// next bin's value is captured as its right neighbour. A tie keeps the lower
// bin.
//
// Interface: bins (in_log, in_idx, in_last) are taken on in_valid; bin 0
// starts a new search. After the bin flagged in_last, out_valid pulses for one
// clock with K, alpha, beta, gamma, which then hold until the next frame's
// result. K_MIN must be at least 1 and K_MAX at most N-2. Timing: out_valid
// one clock after the last bin.
//
// Detecting the three bins around the peak and their magnitudes follows the
// published design; the search window (by default the bins of a 750-1250 MHz
// band at 1350 MHz sampling) and the streaming method are choices of this
// implementation.
module peak_detect #(
  parameter int LW    = $clog2(2 * fe_pkg::FFT_DW) + fe_pkg::LOG_FRAC,
  parameter int IDXW  = $clog2(fe_pkg::N_FFT),
  parameter int K_MIN = fe_pkg::K_MIN_DEF,
  parameter int K_MAX = fe_pkg::K_MAX_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LW-1:0]   in_log,
  input  logic [IDXW-1:0] in_idx,
  input  logic            in_valid,
  input  logic            in_last,
  output logic [IDXW-1:0] k,
  output logic [LW-1:0]   alpha,   // bin K-1
  output logic [LW-1:0]   beta,    // bin K
  output logic [LW-1:0]   gamma,   // bin K+1
  output logic            out_valid
);
  logic [LW-1:0]   prev, best, a_r, g_r;
  logic [IDXW-1:0] k_r;
  logic            have, need_g;
  logic            in_win;

  assign in_win = (int'(in_idx) >= K_MIN) && (int'(in_idx) <= K_MAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; best <= '0; a_r <= '0; g_r <= '0; k_r <= '0;
      have <= 1'b0; need_g <= 1'b0;
      k <= '0; alpha <= '0; beta <= '0; gamma <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        prev <= in_log;
        if (in_idx == '0) begin
          have   <= 1'b0;
          need_g <= 1'b0;
        end else if (in_win && (!have || in_log > best)) begin
          have   <= 1'b1;
          best   <= in_log;
          a_r    <= prev;
          k_r    <= in_idx;
          need_g <= 1'b1;
        end else if (need_g) begin
          g_r    <= in_log;
          need_g <= 1'b0;
        end
        if (in_last) begin
          k         <= k_r;
          alpha     <= a_r;
          beta      <= best;
          gamma     <= g_r;
          out_valid <= 1'b1;
        end
      end
    end
  end

  initial begin
    assert (K_MIN >= 1 && K_MAX <= (1 << IDXW) - 2 && K_MIN <= K_MAX)
      else $error("peak_detect: search window %0d..%0d out of range", K_MIN, K_MAX);
  end

endmodule
