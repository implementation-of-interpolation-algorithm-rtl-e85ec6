// diff_calc: numerator of the parabolic interpolation, alpha - gamma.
//
// alpha and gamma are the log magnitudes of the bins left and right of the
// peak. The difference is signed and one bit wider than the inputs.
// Timing: registered, result and out_valid one clock after in_valid.
// The operation is the published algorithm's first step; the register stage
// is this implementation's choice.
module diff_calc #(
  parameter int LW = $clog2(2 * fe_pkg::FFT_DW) + fe_pkg::LOG_FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [LW-1:0]       alpha,
  input  logic [LW-1:0]       gamma,
  input  logic                in_valid,
  output logic signed [LW:0]  num,      // alpha - gamma
  output logic                out_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) num <= signed'({1'b0, alpha}) - signed'({1'b0, gamma});
    end
  end
endmodule
