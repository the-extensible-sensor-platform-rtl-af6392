// freq_downconverter: mixes the digitized 10.7 MHz IF down to baseband.
//
// A local oscillator (the same phase-accumulator synthesizer as the
// transmitter's DDS, tuned by `ftw`) supplies cosine and sine samples; the
// ADC sample is multiplied by each to give in-phase and quadrature products.
// The products are scaled back to OUT_W bits by dropping the LO's fraction
// bits (an arithmetic shift by IN_W-1). The 2*IF image that the mixing also
// produces is removed by the decimator that follows. The receiver detects
// energy non-coherently, so the LO phase need not match the transmitter's.
// Timing: one sample in and one I/Q pair out per clock, two clocks of
// latency (LO register, product register). The document names this stage
// only; the I/Q mixer structure is this design's choice.
module freq_downconverter #(
  parameter int unsigned IN_W  = esp_pkg::SAMPLE_W,
  parameter int unsigned OUT_W = IN_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [31:0]             ftw,
  input  logic signed [IN_W-1:0]  adc_i,
  output logic signed [OUT_W-1:0] i_o,
  output logic signed [OUT_W-1:0] q_o
);
  logic signed [IN_W-1:0]   lo_sin, lo_cos, adc_d;
  logic signed [2*IN_W-1:0] prod_i, prod_q;

  dds #(.OUT_W(IN_W)) u_lo (
    .clk, .rst_n, .en(1'b1), .ftw,
    .sin_o(lo_sin), .cos_o(lo_cos)
  );

  assign prod_i = adc_d * lo_cos;
  assign prod_q = adc_d * lo_sin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_d <= '0; i_o <= '0; q_o <= '0;
    end else begin
      adc_d <= adc_i;
      i_o   <= OUT_W'(prod_i >>> (IN_W - 1));
      q_o   <= OUT_W'(prod_q >>> (IN_W - 1));
    end
  end
endmodule
