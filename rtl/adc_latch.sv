// adc_latch: input latch and framing of ADC samples.
//
// The ADC delivers offset-binary samples, one per clock when adc_valid is
// high. Every sample is registered on entry (the input latch). A pulse on
// start arms a capture once the downstream FFT is ready (sink_ready); the next
// N valid samples are then passed on as one frame, converted to two's
// complement by inverting the MSB, with s_first on the first and s_last on the
// last sample. Samples outside a frame are dropped.
//
// Timing: a sample on the ADC bus appears on s_data two clocks later (input
// register, then framing register). start may come at any time; it is
// ignored while a frame is being captured or while sink_ready is low.
//
// Latching the ADC data in the FPGA follows the published design; the
// offset-binary format, the start/arm framing and the handshake are choices of
// this implementation.
module adc_latch #(
  parameter int ADC_W = fe_pkg::ADC_BITS,
  parameter int N     = fe_pkg::N_FFT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ADC_W-1:0]        adc_data,   // offset binary
  input  logic                    adc_valid,
  input  logic                    start,      // arm capture of one frame
  input  logic                    sink_ready, // downstream can take a new frame
  output logic signed [ADC_W-1:0] s_data,     // two's complement
  output logic                    s_valid,
  output logic                    s_first,
  output logic                    s_last,
  output logic                    busy        // armed or capturing
);
  localparam int CW = $clog2(N);

  logic [ADC_W-1:0] lat_data;
  logic             lat_valid;
  logic             armed;
  logic [CW-1:0]    cnt;

  // input latch
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_data  <= '0;
      lat_valid <= 1'b0;
    end else begin
      lat_data  <= adc_data;
      lat_valid <= adc_valid;
    end
  end

  // framing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed   <= 1'b0;
      cnt     <= '0;
      s_data  <= '0;
      s_valid <= 1'b0;
      s_first <= 1'b0;
      s_last  <= 1'b0;
    end else begin
      s_valid <= 1'b0;
      s_first <= 1'b0;
      s_last  <= 1'b0;
      if (!armed) begin
        if (start && sink_ready) begin
          armed <= 1'b1;
          cnt   <= '0;
        end
      end else if (lat_valid) begin
        s_data  <= signed'({~lat_data[ADC_W-1], lat_data[ADC_W-2:0]});
        s_valid <= 1'b1;
        s_first <= (cnt == '0);
        s_last  <= (cnt == CW'(N-1));
        cnt     <= cnt + 1'b1;
        if (cnt == CW'(N-1)) armed <= 1'b0;
      end
    end
  end

  assign busy = armed;

endmodule
