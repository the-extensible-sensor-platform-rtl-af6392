// binary_decision: turns filtered signal energy into a data bit.
//
// On each valid filter output the bit becomes 1 if the energy is above
// `threshold` and 0 otherwise (equal counts as 0), and holds until the next
// valid sample. The threshold is an input so the processor can set it.
// Registered: `bit_o` changes one clock after `valid_i`.
module binary_decision #(
  parameter int unsigned W = esp_pkg::SAMPLE_W + 2 + $clog2(esp_pkg::DECIM)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [W-1:0] energy_i,
  input  logic [W-1:0] threshold,
  output logic         bit_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       bit_o <= 1'b0;
    else if (valid_i) bit_o <= (energy_i > threshold);
  end
endmodule
