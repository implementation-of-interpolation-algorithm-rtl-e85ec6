// divider: fixed-point divider that yields the bin offset of the interpolation.
//
// Computes q = num / den with QF fractional bits, rounded toward zero, where
// num = alpha - gamma and den = 2*(2*beta - alpha - gamma). The sign is taken
// off, |num| * 2^QF is divided by den with a restoring shift-subtract loop, one
// quotient bit per clock, and the sign is put back. The result saturates to QW
// bits. For den <= 0 (a flat top or a neighbour above the peak, where no
// parabola with a maximum exists) the result is 0 and den_bad is set.
// With beta the largest of the three values |q| <= 0.5.
//
// Interface: start loads num and den when the divider is idle (busy low).
// Timing: out_valid pulses NW+QF+1 clocks after start, with q and den_bad;
// they hold until the next result.
//
// Dividing the two terms follows the published algorithm, which uses a
// divider core; the radix-2 iterative method, the rounding and the
// saturation are choices of this implementation.
module divider #(
  parameter int NW  = $clog2(2 * fe_pkg::FFT_DW) + fe_pkg::LOG_FRAC + 1,
  parameter int DDW = $clog2(2 * fe_pkg::FFT_DW) + fe_pkg::LOG_FRAC + 3,
  parameter int QF  = fe_pkg::P_FRAC,
  parameter int QW  = fe_pkg::P_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [NW-1:0]  num,
  input  logic signed [DDW-1:0] den,
  input  logic                  start,
  output logic                  busy,
  output logic signed [QW-1:0]  q,
  output logic                  den_bad,
  output logic                  out_valid
);
  localparam int MW = NW + QF;            // dividend (magnitude) bits
  localparam int CW = $clog2(MW + 1);

  logic [MW-1:0]  dvd;      // dividend, shifted out MSB first; quotient shifted in
  logic [DDW-1:0] dvs;      // divisor (positive)
  logic [DDW-1:0] rem;      // always below the divisor
  logic           neg, bad;
  logic [CW-1:0]  cnt;

  logic [NW-1:0]  num_abs;
  assign num_abs = num[NW-1] ? NW'(-num) : NW'(num);

  logic [DDW:0]   rem_sh;
  logic           fits;
  always_comb begin
    rem_sh = {rem, dvd[MW-1]};
    fits   = rem_sh >= {1'b0, dvs};
  end

  // saturation of the magnitude quotient to QW-1 bits
  logic [QW-1:0] mag;
  always_comb begin
    if (dvd > MW'((1 << (QW - 1)) - 1)) mag = QW'((1 << (QW - 1)) - 1);
    else                                mag = QW'(dvd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; dvd <= '0; dvs <= '0; rem <= '0; neg <= 1'b0; bad <= 1'b0;
      cnt <= '0; q <= '0; den_bad <= 1'b0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= '0;
          rem  <= '0;
          neg  <= num[NW-1];
          bad  <= (den <= 0);
          dvd  <= {num_abs, QF'(0)};
          dvs  <= den;
        end
      end else if (cnt == CW'(MW)) begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
        den_bad   <= bad;
        q         <= bad ? '0 : (neg ? -mag : mag);
      end else begin
        cnt <= cnt + 1'b1;
        rem <= DDW'(fits ? rem_sh - {1'b0, dvs} : rem_sh);
        dvd <= {dvd[MW-2:0], fits};
      end
    end
  end

endmodule
