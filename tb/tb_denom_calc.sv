// tb_denom_calc: checks 2*(2*beta - (alpha + gamma)) for random and extreme
// inputs (including a neighbour above the peak, giving a negative result),
// the one-clock latency, and the hold while in_valid is low.
module tb_denom_calc;
  localparam int LW = 14;
  logic clk = 0, rst_n = 0;
  logic [LW-1:0] alpha, beta, gamma;
  logic in_valid, out_valid;
  logic signed [LW+2:0] den;
  int checks = 0, failures = 0;

  denom_calc #(.LW(LW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a, b, g, e;
    alpha = 0; beta = 0; gamma = 0; in_valid = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      a = $urandom_range(0, (1 << LW) - 1); b = $urandom_range(0, (1 << LW) - 1); g = $urandom_range(0, (1 << LW) - 1);
      if (i == 0) begin a = 0; g = 0; b = (1 << LW) - 1; end
      if (i == 1) begin a = (1 << LW) - 1; g = (1 << LW) - 1; b = 0; end
      if (i == 2) begin a = 7409; b = 8088; g = 5525; end   // log values of a measured peak
      alpha = LW'(a); beta = LW'(b); gamma = LW'(g); in_valid = 1;
      @(negedge clk);
      e = 2 * (2 * b - (a + g));
      checks++;
      if (!out_valid || int'(den) != e) begin failures++; $display("FAIL a=%0d b=%0d g=%0d got %0d exp %0d", a, b, g, den, e); end
      in_valid = 0; beta = ~beta;
      @(negedge clk);
      checks++;
      if (out_valid || int'(den) != e) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
