// tb_diff_calc: checks alpha - gamma for random and extreme inputs, the
// one-clock latency and that the result holds while in_valid is low.
module tb_diff_calc;
  localparam int LW = 14;
  logic clk = 0, rst_n = 0;
  logic [LW-1:0] alpha, gamma;
  logic in_valid, out_valid;
  logic signed [LW:0] num;
  int checks = 0, failures = 0;

  diff_calc #(.LW(LW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a, g, e;
    alpha = 0; gamma = 0; in_valid = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      a = $urandom_range(0, (1 << LW) - 1); g = $urandom_range(0, (1 << LW) - 1);
      if (i == 0) begin a = (1 << LW) - 1; g = 0; end
      if (i == 1) begin a = 0; g = (1 << LW) - 1; end
      alpha = LW'(a); gamma = LW'(g); in_valid = 1;
      @(negedge clk);
      e = a - g;
      checks++;
      if (!out_valid || int'(num) != e) begin failures++; $display("FAIL %0d - %0d = %0d", a, g, num); end
      in_valid = 0; alpha = ~alpha;
      @(negedge clk);
      checks++;
      if (out_valid || int'(num) != e) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
