// tb_divider: checks the fixed-point quotient against integer arithmetic.
// q must equal num*2^QF / den rounded toward zero and saturated to QW bits,
// with den <= 0 giving 0 and den_bad. Cases: the terms of a measured peak
// (alpha, beta, gamma = 7409, 8088, 5525 in 1/256 units, giving 74),
// random terms of valid parabolas (|q| <= 0.5), random raw operands and
// saturation. out_valid must come exactly NW+QF+1 clocks after start, and a
// start while busy must be ignored.
module tb_divider;
  localparam int NW = 15, DDW = 17, QF = 8, QW = 10;
  localparam int LAT = NW + QF + 1;
  logic clk = 0, rst_n = 0;
  logic signed [NW-1:0] num;
  logic signed [DDW-1:0] den;
  logic start, busy, den_bad, out_valid;
  logic signed [QW-1:0] q;
  int checks = 0, failures = 0;

  divider #(.NW(NW), .DDW(DDW), .QF(QF), .QW(QW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(int n, int d);
    longint e, mag;
    bit ebad;
    int t;
    ebad = (d <= 0);
    if (ebad) e = 0;
    else begin
      mag = ((n < 0 ? -longint'(n) : longint'(n)) << QF) / longint'(d);
      if (mag > (1 << (QW - 1)) - 1) mag = (1 << (QW - 1)) - 1;
      e = (n < 0) ? -mag : mag;
    end
    num = NW'(n); den = DDW'(d); start = 1;
    @(negedge clk); start = 0;
    t = 0;              // clocks since the edge that took start
    // a second start while busy must not disturb the division
    num = NW'($urandom); den = DDW'($urandom); start = 1; @(negedge clk); start = 0; t++;
    while (!out_valid && t < 100) begin @(negedge clk); t++; end
    checks++;
    if (t != LAT || longint'(q) != e || den_bad != ebad) begin
      failures++;
      $display("FAIL %0d/%0d: q=%0d bad=%b after %0d, exp %0d bad=%b after %0d", n, d, q, den_bad, t, e, ebad, LAT);
    end
    @(negedge clk);
  endtask

  initial begin
    int a, b, g;
    num = 0; den = 0; start = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    one(7409 - 5525, 2 * (2 * 8088 - 7409 - 5525));
    one(-(7409 - 5525), 2 * (2 * 8088 - 7409 - 5525));
    one(100, 0);
    one(-3, -50);
    one(16000, 3);        // saturates
    one(-16000, 3);
    for (int i = 0; i < 300; i++) begin
      b = $urandom_range(0, 16383); a = $urandom_range(0, b); g = $urandom_range(0, b);
      one(a - g, 2 * (2 * b - a - g));
    end
    for (int i = 0; i < 200; i++) one($urandom_range(0, 32767) - 16384, $urandom_range(0, 65535) - 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
