// tb_bin_estimate: checks K + p and the two frequencies.
// Known cases: peak bin 209 with q = 74/256 gives 1102.00 MHz coarse,
// 1100.25 MHz estimated and bin 208 + 182/256; bin 190 gives 1001.75 MHz
// coarse; bin 228 gives 1202.25 MHz. Random K and q are checked against
// f_coarse = floor(K*1350/256 * 4)/4, f_fine = f_coarse + floor(p*1350/256 * 4)/4
// computed in real arithmetic, with the one-clock latency.
module tb_bin_estimate;
  localparam int IDXW = 8, PF = 8, PW = 10, FS = 1350, FF = 2, FW = 16;
  logic clk = 0, rst_n = 0;
  logic [IDXW-1:0] k, k_out;
  logic signed [PW-1:0] q, p;
  logic in_valid, out_valid;
  logic [IDXW+PF-1:0] est_bin;
  logic [FW-1:0] f_coarse, f_fine;
  int checks = 0, failures = 0;

  bin_estimate #(.IDXW(IDXW), .PF(PF), .PW(PW), .FS(FS), .FF(FF), .FW(FW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(int kk, int qq, real fc_exp, real ff_exp, real bin_exp);
    real fc, ff, eb;
    k = IDXW'(kk); q = PW'(qq); in_valid = 1;
    @(negedge clk); in_valid = 0;
    fc = real'(f_coarse) / 4.0; ff = real'(f_fine) / 4.0; eb = real'(est_bin) / 256.0;
    checks++;
    if (!out_valid || fc != fc_exp || ff != ff_exp || eb != bin_exp || int'(p) != -qq || int'(k_out) != kk) begin
      failures++;
      $display("FAIL K=%0d q=%0d: coarse %f (%f) fine %f (%f) bin %f (%f) p=%0d", kk, qq, fc, fc_exp, ff, ff_exp, eb, bin_exp, p);
    end
  endtask

  initial begin
    int kk, qq;
    real bw, fc;
    bw = real'(FS) / 256.0;
    k = 0; q = 0; in_valid = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    one(209, 74, 1102.00, 1100.25, 208.0 + 182.0 / 256.0);
    one(190, 0, 1001.75, 1001.75, 190.0);
    one(228, 89, 1202.25, 1200.25, 228.0 - 89.0 / 256.0);
    for (int i = 0; i < 1000; i++) begin
      kk = $urandom_range(1, 254);
      qq = $urandom_range(0, 256) - 128;
      fc = $floor(kk * bw * 4.0) / 4.0;
      one(kk, qq, fc, fc + $floor(-qq / 256.0 * bw * 4.0) / 4.0, kk - qq / 256.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
