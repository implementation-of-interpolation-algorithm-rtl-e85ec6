// freq_estimator: FFT peak interpolation for fine frequency measurement.
//
// A digital receiver measures the frequency of a tone with an N-point FFT; the
// peak bin K alone limits the accuracy to the bin spacing Fs/N. This design
// refines it by fitting a parabola through the log magnitudes alpha, beta,
// gamma of bins K-1, K, K+1 and taking its vertex:
//   p = (alpha - gamma) / (2*(alpha - 2*beta + gamma)),  f = (K + p) * Fs/N.
//
// Chain: adc_latch (latch and frame N samples) -> fft -> log_magnitude ->
// peak_detect (K, alpha, beta, gamma) -> diff_calc (alpha-gamma) and
// denom_calc (2*(2*beta-alpha-gamma)) in parallel -> divider -> bin_estimate
// (K + p, coarse and estimated frequency).
//
// Interface: ADC samples (offset binary) on adc_data/adc_valid. A pulse on
// start captures the next N samples as one frame. It is ignored while a frame
// is being captured or while the FFT is still flushing the previous frame. One
// result per frame: res_valid pulses with the peak bin, the three log
// magnitudes, p, the estimated bin and both frequencies; they hold until the
// next result. busy is high while any frame is in flight. A new frame may be
// captured while the previous one is still read out of the FFT and processed.
//
// Timing per frame at one sample per clock without gaps: res_valid rises
// 3N + log2(N) + 32 clocks after the edge that takes start (808 at the
// defaults): N+2 clocks of capture, N+log2(N)-2 clocks of FFT flush, 2 clocks
// into the reorder buffer, N clocks of bin read-out, then 2 (log) + 1 (peak)
// + 1 (terms) + 25 (divider) + 1 (estimate) + 1 (result register) clocks. A
// new start is taken 2N+log2(N) clocks after the previous one at the
// earliest.
//
// The processing steps and the pipelined FFT follow the published FPGA
// implementation; the interfaces, fixed-point widths and the FFT's internal
// structure are this design's own choices (see each block).
module freq_estimator #(
  parameter int N      = fe_pkg::N_FFT,
  parameter int ADC_W  = fe_pkg::ADC_BITS,
  parameter int FS_MHZ = fe_pkg::FS_MHZ,
  parameter int K_MIN  = fe_pkg::K_MIN_DEF,
  parameter int K_MAX  = fe_pkg::K_MAX_DEF,
  localparam int IDXW  = $clog2(N),
  localparam int DW    = ADC_W + IDXW + 2,
  localparam int LW    = $clog2(2 * DW) + fe_pkg::LOG_FRAC,
  localparam int PF    = fe_pkg::P_FRAC,
  localparam int PW    = fe_pkg::P_W,
  localparam int FW    = fe_pkg::FREQ_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ADC_W-1:0]     adc_data,
  input  logic                 adc_valid,
  input  logic                 start,
  output logic                 busy,
  output logic                 res_valid,
  output logic [IDXW-1:0]      res_k,        // peak bin K
  output logic [LW-1:0]        res_alpha,    // log2 |X|^2 of bin K-1
  output logic [LW-1:0]        res_beta,     // log2 |X|^2 of bin K
  output logic [LW-1:0]        res_gamma,    // log2 |X|^2 of bin K+1
  output logic signed [PW-1:0] res_p,        // bin offset p, PF fractional bits
  output logic                 res_p_bad,    // no maximum through the three bins
  output logic [IDXW+PF-1:0]   res_est_bin,  // K + p
  output logic [FW-1:0]        res_f_coarse, // K*Fs/N in MHz, 2 fractional bits
  output logic [FW-1:0]        res_f_fine    // (K+p)*Fs/N in MHz, 2 fractional bits
);
  // adc_latch -> fft
  logic signed [ADC_W-1:0] s_data;
  logic s_valid, s_first, s_last, lat_busy, fft_ready;
  // fft -> log_magnitude
  logic signed [DW-1:0] x_re, x_im;
  logic [IDXW-1:0] x_idx;
  logic x_valid, x_last;
  // log_magnitude -> peak_detect
  logic [LW-1:0] l_log;
  logic [IDXW-1:0] l_idx;
  logic l_valid, l_last;
  // peak_detect -> terms
  logic [IDXW-1:0] pk_k;
  logic [LW-1:0] pk_a, pk_b, pk_g;
  logic pk_valid;
  // terms -> divider
  logic signed [LW:0] num;
  logic signed [LW+2:0] den;
  logic num_valid, den_valid;
  // divider -> bin_estimate
  logic signed [PW-1:0] q;
  logic q_valid, q_bad, div_busy;
  logic [IDXW-1:0] est_k;
  logic est_valid;

  adc_latch #(.ADC_W(ADC_W), .N(N)) u_latch (
    .clk, .rst_n, .adc_data, .adc_valid, .start, .sink_ready(fft_ready),
    .s_data, .s_valid, .s_first, .s_last, .busy(lat_busy)
  );

  fft #(.N(N), .IW(ADC_W), .DW(DW), .TW(fe_pkg::TWID_W)) u_fft (
    .clk, .rst_n, .in_data(s_data), .in_valid(s_valid), .in_ready(fft_ready),
    .out_re(x_re), .out_im(x_im), .out_idx(x_idx), .out_valid(x_valid), .out_last(x_last)
  );

  log_magnitude #(.DW(DW), .IDXW(IDXW)) u_log (
    .clk, .rst_n, .in_re(x_re), .in_im(x_im), .in_idx(x_idx), .in_valid(x_valid),
    .in_last(x_last), .out_log(l_log), .out_idx(l_idx), .out_valid(l_valid), .out_last(l_last)
  );

  peak_detect #(.LW(LW), .IDXW(IDXW), .K_MIN(K_MIN), .K_MAX(K_MAX)) u_peak (
    .clk, .rst_n, .in_log(l_log), .in_idx(l_idx), .in_valid(l_valid), .in_last(l_last),
    .k(pk_k), .alpha(pk_a), .beta(pk_b), .gamma(pk_g), .out_valid(pk_valid)
  );

  diff_calc #(.LW(LW)) u_diff (
    .clk, .rst_n, .alpha(pk_a), .gamma(pk_g), .in_valid(pk_valid),
    .num, .out_valid(num_valid)
  );

  denom_calc #(.LW(LW)) u_denom (
    .clk, .rst_n, .alpha(pk_a), .beta(pk_b), .gamma(pk_g), .in_valid(pk_valid),
    .den, .out_valid(den_valid)
  );

  divider #(.NW(LW + 1), .DDW(LW + 3), .QF(PF), .QW(PW)) u_div (
    .clk, .rst_n, .num, .den, .start(num_valid && den_valid), .busy(div_busy),
    .q, .den_bad(q_bad), .out_valid(q_valid)
  );

  bin_estimate #(.IDXW(IDXW), .PF(PF), .PW(PW), .FS(FS_MHZ), .FF(fe_pkg::FREQ_FRAC), .FW(FW)) u_est (
    .clk, .rst_n, .k(pk_k), .q, .in_valid(q_valid),
    .k_out(est_k), .p(res_p), .est_bin(res_est_bin), .f_coarse(res_f_coarse),
    .f_fine(res_f_fine), .out_valid(est_valid)
  );

  // result registers and count of frames in flight (at most two: one being
  // captured, one in the FFT read-out or the back end)
  logic [1:0] in_flight;
  logic       arm;
  assign arm  = start && !lat_busy && fft_ready;
  assign busy = (in_flight != 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_flight <= '0; res_valid <= 1'b0; res_k <= '0; res_alpha <= '0; res_beta <= '0;
      res_gamma <= '0; res_p_bad <= 1'b0;
    end else begin
      res_valid <= est_valid;
      in_flight <= in_flight + 2'(arm) - 2'(est_valid);
      if (q_valid) res_p_bad <= q_bad;
      if (est_valid) begin
        res_k     <= est_k;
        res_alpha <= pk_a;
        res_beta  <= pk_b;
        res_gamma <= pk_g;
      end
    end
  end

  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) num_valid |-> !div_busy)
    else $error("divider busy on new terms");

  logic unused;
  assign unused = ^{s_first, s_last};

endmodule
