// bin_estimate: interpolated peak bin and the coarse and estimated frequency.
//
// From the peak bin K and q = (alpha-gamma) / (2*(2*beta-alpha-gamma)) it
// forms the bin offset p = -q, which is the vertex of the parabola through the
// three log magnitudes relative to K (negative when the left neighbour is the
// larger), and
//   est_bin  = K + p                         (PF fractional bits)
//   f_coarse = floor(K * Fs/N)               (FF fractional bits, MHz)
//   f_fine   = f_coarse + floor(p * Fs/N)    (FF fractional bits, MHz)
// The frequency of a bin is K * Fs/N with K counted over the whole FFT, which
// maps bins N/2..N-1 onto Fs/2..Fs for band-pass sampling in the second
// Nyquist zone. With N a power of two the divisions by N are shifts.
//
// Timing: registered; outputs and out_valid one clock after in_valid.
//
// The formulas K + p and (K + p) * Fs/N follow the published algorithm. The
// fixed-point formats (0.25 MHz frequency steps, 8 fractional bits of p) and
// adding the shift to the already truncated coarse frequency are taken from
// the published hardware results, which they reproduce.
module bin_estimate #(
  parameter int IDXW = $clog2(fe_pkg::N_FFT),
  parameter int PF   = fe_pkg::P_FRAC,
  parameter int PW   = fe_pkg::P_W,
  parameter int FS   = fe_pkg::FS_MHZ,
  parameter int FF   = fe_pkg::FREQ_FRAC,
  parameter int FW   = fe_pkg::FREQ_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [IDXW-1:0]          k,
  input  logic signed [PW-1:0]     q,        // (alpha-gamma)/(2(2beta-alpha-gamma))
  input  logic                     in_valid,
  output logic [IDXW-1:0]          k_out,
  output logic signed [PW-1:0]     p,        // bin offset, PF fractional bits
  output logic [IDXW+PF-1:0]       est_bin,  // K + p, PF fractional bits
  output logic [FW-1:0]            f_coarse, // MHz, FF fractional bits
  output logic [FW-1:0]            f_fine,   // MHz, FF fractional bits
  output logic                     out_valid
);
  localparam int FSQ = FS << FF;           // Fs in frequency LSBs
  localparam int MW  = IDXW + PW + $clog2(FSQ + 1) + 2;

  logic signed [PW-1:0]  p_c;
  logic signed [MW-1:0]  kf, pf;
  logic [FW-1:0]         coarse_c;
  logic signed [FW:0]    shift_c;
  always_comb begin
    p_c      = -q;
    kf       = MW'(k) * MW'(FSQ);
    pf       = MW'(p_c) * MW'(FSQ);
    coarse_c = FW'(kf >>> IDXW);
    shift_c  = (FW+1)'(pf >>> (IDXW + PF));  // floor
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_out <= '0; p <= '0; est_bin <= '0; f_coarse <= '0; f_fine <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        k_out    <= k;
        p        <= p_c;
        est_bin  <= (IDXW+PF)'((MW'(k) << PF) + MW'(p_c));
        f_coarse <= coarse_c;
        f_fine   <= FW'(signed'({1'b0, coarse_c}) + shift_c);
      end
    end
  end
endmodule
