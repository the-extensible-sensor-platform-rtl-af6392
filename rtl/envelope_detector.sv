// envelope_detector: absolute-value type envelope detector.
//
// For every valid decimated I/Q pair it outputs |I| + |Q|, an estimate of
// the signal magnitude that needs no multiplier and does not depend on the
// carrier phase (it lies between 1 and 1.41 times the true magnitude). This
// is the non-coherent detection of the receiver. Registered: the result and
// `valid_o` appear one clock after `valid_i`. Using both I and Q is this
// design's choice.
module envelope_detector #(
  parameter int unsigned IN_W = esp_pkg::SAMPLE_W + 1 + $clog2(esp_pkg::DECIM)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid_i,
  input  logic signed [IN_W-1:0] i_i,
  input  logic signed [IN_W-1:0] q_i,
  output logic                   valid_o,
  output logic [IN_W:0]          env_o
);
  logic [IN_W-1:0] abs_i, abs_q;

  assign abs_i = i_i[IN_W-1] ? IN_W'(-i_i) : IN_W'(i_i);
  assign abs_q = q_i[IN_W-1] ? IN_W'(-q_i) : IN_W'(q_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0; env_o <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) env_o <= (IN_W + 1)'(abs_i) + (IN_W + 1)'(abs_q);
    end
  end
endmodule
