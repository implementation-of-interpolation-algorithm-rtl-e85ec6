// fft: N-point pipelined FFT, radix-2 single-path delay feedback (R2SDF),
// decimation in frequency, followed by a bit-reversal reorder buffer.
//
// The samples of a frame stream through log2(N) stages. Stage s holds a
// feedback delay line of D = N/2^(s+1) words. During the first D samples of
// every block of 2D, the stage stores its input in the delay line and outputs
// what the line returns. During the second D samples it forms the butterfly
// of the stored sample a and the new sample b: a+b goes out at once, and
// (a-b)*W^(j*2^s) goes into the line, to go out over the next D samples. Each
// stage has an output register. The data are not scaled; the width DW leaves
// room for the log2(N) bits of growth. Twiddles W^k = cos(2*pi*k/N) -
// j*sin(2*pi*k/N), k < N/2, are computed at elaboration with TW-2 fractional
// bits, and products are rounded.
//
// The pipeline moves only on an accepted sample, or by itself while it
// flushes a completed frame. The results come out of the last stage in
// bit-reversed order. They are written into an N-word buffer at bit-reversed
// addresses, and the buffer is read out in natural order, bins 0..N-1, one
// per clock.
//
// Interface: in_ready is high while the FFT is idle, when a new frame may
// begin. The first in_valid sample then starts a frame. All N samples of the
// frame are taken as they come, with in_ready low, and gaps in in_valid are
// allowed. in_ready rises again once the frame has been flushed. Reading out
// one frame overlaps with loading the next.
// Timing: after the last sample of a frame the pipeline flushes for N+L-2
// clocks (L = log2(N)). Then out_valid is high for N clocks, starting 2
// clocks later, with out_last on bin N-1.
//
// A pipelined FFT follows the published design, which used a vendor core.
// The R2SDF structure, the widths, the rounding and the handshake are
// choices of this implementation.
module fft #(
  parameter int N  = fe_pkg::N_FFT,
  parameter int IW = fe_pkg::ADC_BITS,
  parameter int DW = fe_pkg::FFT_DW,
  parameter int TW = fe_pkg::TWID_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [IW-1:0]        in_data,
  input  logic                        in_valid,
  output logic                        in_ready,
  output logic signed [DW-1:0]        out_re,
  output logic signed [DW-1:0]        out_im,
  output logic [$clog2(N)-1:0]        out_idx,
  output logic                        out_valid,
  output logic                        out_last
);
  localparam int L   = $clog2(N);
  localparam int TF  = TW - 2;               // twiddle fractional bits
  localparam int PW  = DW + TW;
  localparam int EW  = L + 2;                // enable counter, counts to 2N+L
  localparam int LAT = N + L - 2;            // enables from a sample to its result

  typedef enum logic [1:0] {IDLE, LOAD, FLUSH} pstate_t;
  pstate_t pstate;

  // ---------------------------------------------------------------- twiddles
  function automatic logic signed [TW-1:0] tw_cos(int k);
    real a;
    a = 2.0 * 3.14159265358979323846 * k / N;
    return TW'($rtoi($floor($cos(a) * (2.0 ** TF) + 0.5)));
  endfunction

  function automatic logic signed [TW-1:0] tw_msin(int k);
    real a;
    a = 2.0 * 3.14159265358979323846 * k / N;
    return TW'($rtoi($floor(-$sin(a) * (2.0 ** TF) + 0.5)));
  endfunction

  logic signed [TW-1:0] w_re [N/2];
  logic signed [TW-1:0] w_im [N/2];
  for (genvar g = 0; g < N/2; g++) begin : g_tw
    localparam logic signed [TW-1:0] WR = tw_cos(g);
    localparam logic signed [TW-1:0] WI = tw_msin(g);
    assign w_re[g] = WR;
    assign w_im[g] = WI;
  end

  function automatic logic [L-1:0] bitrev(logic [L-1:0] v);
    for (int i = 0; i < L; i++) bitrev[i] = v[L-1-i];
  endfunction

  // ------------------------------------------------------------ control
  logic          en;          // pipeline advances
  logic [EW-1:0] e;           // enables since the first sample of the frame
  logic [EW-1:0] e_cur;       // index of the current enable within the frame
  logic [L-1:0]  n_in;        // samples taken in this frame

  assign en       = in_valid || (pstate == FLUSH);
  assign in_ready = (pstate == IDLE);
  assign e_cur    = (pstate == IDLE) ? '0 : e;

  // ------------------------------------------------------------ stages
  logic signed [DW-1:0] s_re [L+1];
  logic signed [DW-1:0] s_im [L+1];
  assign s_re[0] = DW'(in_data);
  assign s_im[0] = '0;

  for (genvar s = 0; s < L; s++) begin : g_st
    localparam int D   = N >> (s + 1);
    localparam int DB  = (D > 1) ? $clog2(D) : 1;
    localparam int LATS = N - 2 * D + s;     // enables before this stage's input holds sample 0

    logic signed [DW-1:0] dl_re [D];
    logic signed [DW-1:0] dl_im [D];
    logic [EW-1:0]        idx;               // position of the current input in this stage's stream
    logic                 second;            // second half of a block of 2D
    logic [DB-1:0]        ptr;
    logic [L-2:0]         tk;
    logic signed [DW-1:0] a_re, a_im, d_re, d_im;
    logic signed [TW-1:0] wr, wi;
    logic signed [PW-1:0] p_re, p_im;
    logic signed [DW-1:0] fb_re, fb_im, o_re, o_im;

    always_comb begin
      idx    = e_cur - EW'(LATS);
      second = (D > 1) ? idx[DB] : idx[0];
      ptr    = (D > 1) ? idx[DB-1:0] : '0;
      tk     = (L-1)'(int'(ptr) << s);
      a_re   = dl_re[ptr];
      a_im   = dl_im[ptr];
      d_re   = a_re - s_re[s];
      d_im   = a_im - s_im[s];
      wr     = w_re[tk];
      wi     = w_im[tk];
      p_re   = PW'(wr * d_re) - PW'(wi * d_im) + (PW'(1) <<< (TF - 1));
      p_im   = PW'(wr * d_im) + PW'(wi * d_re) + (PW'(1) <<< (TF - 1));
      if (second) begin
        o_re  = a_re + s_re[s];
        o_im  = a_im + s_im[s];
        fb_re = DW'(p_re >>> TF);
        fb_im = DW'(p_im >>> TF);
      end else begin
        o_re  = a_re;
        o_im  = a_im;
        fb_re = s_re[s];
        fb_im = s_im[s];
      end
    end

    logic signed [DW-1:0] r_re, r_im;
    always_ff @(posedge clk) begin
      if (en) begin
        dl_re[ptr] <= fb_re;
        dl_im[ptr] <= fb_im;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r_re <= '0; r_im <= '0;
      end else if (en) begin
        r_re <= o_re; r_im <= o_im;
      end
    end
    assign s_re[s+1] = r_re;
    assign s_im[s+1] = r_im;
  end

  // ------------------------------------------------------------ reorder buffer
  logic signed [DW-1:0] rb_re [N];
  logic signed [DW-1:0] rb_im [N];
  logic          wr_pend;
  logic [L-1:0]  wr_idx;      // output stream index held by the last stage register
  logic          reading;
  logic [L-1:0]  rd;

  always_ff @(posedge clk) begin
    if (wr_pend) begin
      rb_re[bitrev(wr_idx)] <= s_re[L];
      rb_im[bitrev(wr_idx)] <= s_im[L];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate <= IDLE; e <= '0; n_in <= '0; wr_pend <= 1'b0; wr_idx <= '0;
      reading <= 1'b0; rd <= '0;
      out_valid <= 1'b0; out_last <= 1'b0; out_re <= '0; out_im <= '0; out_idx <= '0;
    end else begin
      // frame control
      if (en) e <= e_cur + 1'b1;
      unique case (pstate)
        IDLE:  if (in_valid) begin pstate <= LOAD; n_in <= L'(1); end
        LOAD:  if (in_valid) begin
                 n_in <= n_in + 1'b1;
                 if (n_in == L'(N - 1)) pstate <= FLUSH;
               end
        FLUSH: if (e_cur == EW'(LAT + N - 1)) pstate <= IDLE;
        default: pstate <= IDLE;
      endcase
      // the last stage register takes output index (enable count - LAT)
      wr_pend <= 1'b0;
      if (en && e_cur >= EW'(LAT) && e_cur < EW'(LAT + N)) begin
        wr_pend <= 1'b1;
        wr_idx  <= L'(e_cur - EW'(LAT));
      end
      // read-out in natural order once the last result is written
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (wr_pend && wr_idx == L'(N - 1)) begin
        reading <= 1'b1;
        rd      <= '0;
      end
      if (reading) begin
        out_re    <= rb_re[rd];
        out_im    <= rb_im[rd];
        out_idx   <= rd;
        out_valid <= 1'b1;
        out_last  <= (rd == L'(N - 1));
        rd        <= rd + 1'b1;
        if (rd == L'(N - 1)) reading <= 1'b0;
      end
    end
  end

endmodule
