// tb_log_magnitude: checks log2(re^2 + im^2) against real arithmetic.
// Streams random bins of every magnitude (plus zero and full scale) one per
// clock, with gaps, and checks each result within 2 LSBs (2/256) of the exact
// value, that it arrives exactly 2 clocks after its input, and that index and
// last flag travel with it.
module tb_log_magnitude;
  localparam int DW = 18, IDXW = 8, LF = 8;
  localparam int LW = $clog2(2 * DW) + LF;
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] in_re, in_im;
  logic [IDXW-1:0] in_idx, out_idx;
  logic in_valid, in_last, out_valid, out_last;
  logic [LW-1:0] out_log;
  int checks = 0, failures = 0;

  log_magnitude #(.DW(DW), .IDXW(IDXW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected results by input cycle
  real    exp_log [$];
  int     exp_idx [$];
  bit     exp_last [$];
  longint exp_t [$];
  longint cyc = 0;
  real    emax = 0.0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      real m;
      m = real'(in_re) * real'(in_re) + real'(in_im) * real'(in_im);
      exp_log.push_back(m == 0.0 ? 0.0 : $ln(m) / $ln(2.0));
      exp_idx.push_back(int'(in_idx));
      exp_last.push_back(in_last);
      exp_t.push_back(cyc + 2);
    end
    if (rst_n && out_valid) begin
      real got, e;
      got = real'(out_log) / 256.0;
      e = got - exp_log[0]; if (e < 0) e = -e;
      if (e > emax) emax = e;
      checks++;
      if (e > 2.0 / 256.0 || cyc != exp_t[0] || int'(out_idx) != exp_idx[0] || out_last != exp_last[0]) begin
        failures++;
        if (failures < 10) $display("FAIL got %f exp %f t %0d/%0d idx %0d/%0d", got, exp_log[0], cyc, exp_t[0], out_idx, exp_idx[0]);
      end
      void'(exp_log.pop_front()); void'(exp_idx.pop_front()); void'(exp_last.pop_front()); void'(exp_t.pop_front());
    end
  end

  initial begin
    int sh;
    in_re = 0; in_im = 0; in_idx = 0; in_valid = 0; in_last = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      sh = $urandom_range(0, DW - 1);
      in_re  = DW'(signed'($urandom) >>> (32 - DW + sh));
      in_im  = DW'(signed'($urandom) >>> (32 - DW + $urandom_range(0, DW - 1)));
      if (i == 0) begin in_re = 0; in_im = 0; end
      if (i == 1) begin in_re = -(1 <<< (DW - 1)); in_im = -(1 <<< (DW - 1)); end
      if (i == 2) begin in_re = 1; in_im = 0; end
      in_idx   = IDXW'(i);
      in_last  = (i % 256) == 255;
      in_valid = ($urandom_range(0, 4) != 0);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_log.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_log.size()); end
    $display("largest error %f", emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
