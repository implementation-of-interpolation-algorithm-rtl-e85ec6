// denom_calc: denominator of the parabolic interpolation, 2*(2*beta - (alpha+gamma)).
//
// The sum alpha+gamma and the doubled peak 2*beta are formed side by side,
// subtracted, and the difference doubled (a shift). When beta is the largest
// of the three values the result is positive; it is zero for a flat top and
// can be negative only if a neighbour exceeds the peak. Output is signed,
// three bits wider than the inputs.
// Timing: registered, result and out_valid one clock after in_valid.
// The steps follow the published algorithm; the register stage is this
// implementation's choice.
module denom_calc #(
  parameter int LW = $clog2(2 * fe_pkg::FFT_DW) + fe_pkg::LOG_FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LW-1:0]        alpha,
  input  logic [LW-1:0]        beta,
  input  logic [LW-1:0]        gamma,
  input  logic                 in_valid,
  output logic signed [LW+2:0] den,      // 2*(2*beta - (alpha + gamma))
  output logic                 out_valid
);
  logic [LW:0]          sum_ag;   // step b
  logic [LW:0]          two_b;    // step c
  logic signed [LW+1:0] diff;     // step d, before doubling

  always_comb begin
    sum_ag = (LW+1)'(alpha) + (LW+1)'(gamma);
    two_b  = {beta, 1'b0};
    diff   = signed'({1'b0, two_b}) - signed'({1'b0, sum_ag});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      den <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) den <= {diff, 1'b0};
    end
  end
endmodule
