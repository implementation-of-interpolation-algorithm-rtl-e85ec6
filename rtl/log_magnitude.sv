// log_magnitude: logarithmic magnitude of FFT bins.
//
// For each bin it computes L = log2(re^2 + im^2) as an unsigned fixed-point
// number with LF fractional bits (one unit of L is about 3.01 dB). The
// integer part is the position of the leading one of the squared magnitude;
// the fraction is looked up in a table of log2(1 + m/2^LB), addressed by the
// LB bits that follow the leading one. The table is computed at elaboration
// and rounded to LF bits. A zero magnitude gives L = 0.
//
// Interface: a bin (re, im, idx, last) is taken when in_valid is high, one per
// clock. Timing: fixed latency of 2 clocks (squares, then leading-one and
// table); out_valid, out_idx and out_last follow in_valid, in_idx and in_last.
//
// Measuring the FFT magnitude on a log scale follows the published design;
// the base-2 log of the squared magnitude, its format (8 fractional bits, as
// in the published log values) and the table method are choices of this
// implementation.
module log_magnitude #(
  parameter int DW = fe_pkg::FFT_DW,
  parameter int IDXW = $clog2(fe_pkg::N_FFT),
  parameter int LF = fe_pkg::LOG_FRAC,
  parameter int LB = fe_pkg::LOG_LUT_BITS,
  localparam int SQW = 2 * DW,                // squared magnitude width
  localparam int LW  = $clog2(SQW) + LF       // log value width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic [IDXW-1:0]      in_idx,
  input  logic                 in_valid,
  input  logic                 in_last,
  output logic [LW-1:0]        out_log,
  output logic [IDXW-1:0]      out_idx,
  output logic                 out_valid,
  output logic                 out_last
);
  localparam int EW = $clog2(SQW);

  // log2(1 + i/2^LB) * 2^LF, rounded, saturated to LF bits
  function automatic logic [LF-1:0] frac_log(int i);
    real v;
    int  r;
    v = $ln(1.0 + real'(i) / (2.0 ** LB)) / $ln(2.0);
    r = $rtoi($floor(v * (2.0 ** LF) + 0.5));
    if (r > (1 << LF) - 1) r = (1 << LF) - 1;
    return LF'(r);
  endfunction

  logic [LF-1:0] lut [2**LB];
  for (genvar g = 0; g < 2**LB; g++) begin : g_lut
    localparam logic [LF-1:0] V = frac_log(g);
    assign lut[g] = V;
  end

  // stage 1: squared magnitude
  logic [SQW-1:0]  sq;
  logic [IDXW-1:0] idx1;
  logic            v1, l1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq <= '0; idx1 <= '0; v1 <= 1'b0; l1 <= 1'b0;
    end else begin
      sq   <= SQW'(in_re * in_re) + SQW'(in_im * in_im);
      idx1 <= in_idx;
      v1   <= in_valid;
      l1   <= in_last;
    end
  end

  // stage 2: leading one, normalisation, table
  logic [EW-1:0]  lead;
  logic [SQW-1:0] norm;
  logic [LB-1:0]  mant;
  always_comb begin
    lead = '0;
    for (int b = 0; b < SQW; b++) if (sq[b]) lead = EW'(b);
    norm = sq << (SQW - 1 - int'(lead));
    mant = norm[SQW-2 -: LB];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_log <= '0; out_idx <= '0; out_valid <= 1'b0; out_last <= 1'b0;
    end else begin
      out_log   <= (sq == '0) ? '0 : {lead, lut[mant]};
      out_idx   <= idx1;
      out_valid <= v1;
      out_last  <= l1;
    end
  end

endmodule
