// decimator: reduces the I/Q sample rate by a factor of R (50).
//
// An integrate-and-dump (first-order CIC) filter: each channel sums R input
// samples and outputs the sum once, with a one-clock `valid_o` pulse, then
// starts a new sum. The boxcar sum is the anti-alias filter; it also removes
// most of the mixer's 2*IF image. The output is IN_W + ceil(log2 R) bits so
// nothing overflows. At 25 MHz in, R = 50 gives a 500 kHz output rate.
// The factor follows the document; the filter type is this design's choice.
module decimator #(
  parameter int unsigned R     = esp_pkg::DECIM,
  parameter int unsigned IN_W  = esp_pkg::SAMPLE_W + 1,
  parameter int unsigned OUT_W = IN_W + $clog2(R)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  i_i,
  input  logic signed [IN_W-1:0]  q_i,
  output logic signed [OUT_W-1:0] i_o,
  output logic signed [OUT_W-1:0] q_o,
  output logic                    valid_o
);
  localparam int unsigned CW = $clog2(R);

  logic [CW-1:0]           cnt;
  logic signed [OUT_W-1:0] acc_i, acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; acc_i <= '0; acc_q <= '0;
      i_o <= '0; q_o <= '0; valid_o <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      if (cnt == CW'(R - 1)) begin
        cnt     <= '0;
        i_o     <= acc_i + OUT_W'(i_i);
        q_o     <= acc_q + OUT_W'(q_i);
        valid_o <= 1'b1;
        acc_i   <= '0;
        acc_q   <= '0;
      end else begin
        cnt   <= cnt + CW'(1);
        acc_i <= acc_i + OUT_W'(i_i);
        acc_q <= acc_q + OUT_W'(q_i);
      end
    end
  end
endmodule
