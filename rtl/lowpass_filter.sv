// lowpass_filter: smooths the envelope to measure signal energy.
//
// A first-order recursive (exponential) filter, updated on each valid
// sample: y <= y + (x - y) / 2^SHIFT, done with an arithmetic shift. Its
// time constant is 2^SHIFT samples (8 samples = 16 us at 500 kHz), short
// against the 375 us sub-bit, so the output settles well inside each
// carrier on or off period. Registered: `y_o` and `valid_o` follow
// `valid_i` by one clock. The filter form and SHIFT are this design's
// choices; the document only says a low pass filter follows the detector.
module lowpass_filter #(
  parameter int unsigned W     = esp_pkg::SAMPLE_W + 2 + $clog2(esp_pkg::DECIM),
  parameter int unsigned SHIFT = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [W-1:0] x_i,
  output logic         valid_o,
  output logic [W-1:0] y_o
);
  logic signed [W+1:0] diff;

  assign diff = $signed({2'b00, x_i}) - $signed({2'b00, y_o});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0; y_o <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) y_o <= W'($signed({2'b00, y_o}) + (diff >>> SHIFT));
    end
  end
endmodule
