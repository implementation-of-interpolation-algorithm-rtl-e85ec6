// tb_adc_latch: checks input latching, offset-binary conversion and framing.
// Drives a counting ADC stream with gaps in adc_valid, arms captures with
// start (also while not ready and while busy) and checks that exactly N
// samples per frame come out, in order, two's complement, with first/last
// flags, and that samples before start or after the frame are dropped.
module tb_adc_latch;
  localparam int N = 16, W = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] adc_data;
  logic adc_valid, start, sink_ready;
  logic signed [W-1:0] s_data;
  logic s_valid, s_first, s_last, busy;
  int checks = 0, failures = 0;

  adc_latch #(.ADC_W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  // reference: a queue of expected samples fed when a capture is armed
  logic [W-1:0] sent [$];
  int  got, frame_cnt, n_out;
  logic signed [W-1:0] exp_s;

  always @(posedge clk) if (rst_n && s_valid) begin
    checks++;
    exp_s = signed'(sent[got] ^ 8'h80);
    if (s_data !== exp_s) begin failures++; $display("FAIL data %0d exp %0d", s_data, exp_s); end
    checks++;
    if (s_first !== (n_out == 0) || s_last !== (n_out == N-1)) begin
      failures++; $display("FAIL flags n=%0d first=%b last=%b", n_out, s_first, s_last);
    end
    got++;
    n_out = (n_out == N-1) ? 0 : n_out + 1;
    if (s_last) frame_cnt++;
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_frame(bit gaps);
    int n;
    // wait until idle, arm
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 0;
    // latch adds a cycle: the sample on the bus the cycle after start is the first
    while (n < N) begin
      adc_valid = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      adc_data  = W'($urandom);
      if (adc_valid) begin sent.push_back(adc_data); n++; end
      if (n == 3) begin start = 1; end        // start while busy: must be ignored
      @(negedge clk); start = 0;
    end
    // samples after the frame are dropped
    repeat (5) begin adc_valid = 1; adc_data = W'($urandom); @(negedge clk); end
    adc_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    got = 0; frame_cnt = 0; n_out = 0;
    adc_data = 0; adc_valid = 0; start = 0; sink_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    // samples without a start are dropped
    repeat (6) begin adc_valid = 1; adc_data = W'($urandom); @(negedge clk); end
    adc_valid = 0; @(negedge clk);
    // start while sink not ready is ignored
    sink_ready = 0; start = 1; @(negedge clk); start = 0; sink_ready = 1;
    repeat (4) begin adc_valid = 1; adc_data = W'($urandom); @(negedge clk); end
    adc_valid = 0; repeat (3) @(negedge clk);
    checks++; if (got != 0 || busy) begin failures++; $display("FAIL: output without armed start"); end
    // the latch has a one-cycle delay: keep the bus idle in the start cycle
    run_frame(0);
    run_frame(1);
    run_frame(1);
    checks++; if (frame_cnt != 3 || got != 3*N) begin failures++; $display("FAIL frames=%0d got=%0d", frame_cnt, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
