// ask_receiver: ASK data receiver, IF samples in, carrier on/off bit out.
//
// The chain is: frequency downconverter (10.7 MHz IF to baseband I/Q),
// decimation by 50 (25 MHz to 500 kHz), absolute-value envelope detector,
// low pass filter, and binary decision against `threshold`. `carrier` is 1
// while the filtered energy is above the threshold and is the recovered
// data stream given to the processor and the sync/bit decoder. `energy` and
// `energy_valid` expose the filter output so software can choose a
// threshold. Latency from a carrier step at the ADC to `carrier` is the
// decimation block (up to 50 clocks) plus a few filter time constants.
// The order of stages follows the document; the widths are this design's.
module ask_receiver #(
  parameter int unsigned IN_W  = esp_pkg::SAMPLE_W,
  parameter int unsigned R     = esp_pkg::DECIM,
  parameter int unsigned SHIFT = 3,
  localparam int unsigned MIX_W = IN_W + 1,
  localparam int unsigned DEC_W = MIX_W + $clog2(R),
  localparam int unsigned ENV_W = DEC_W + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [31:0]            ftw,
  input  logic signed [IN_W-1:0] adc_i,
  input  logic [ENV_W-1:0]       threshold,
  output logic [ENV_W-1:0]       energy,
  output logic                   energy_valid,
  output logic                   carrier
);
  logic signed [MIX_W-1:0] mix_i, mix_q;
  logic signed [DEC_W-1:0] dec_i, dec_q;
  logic                    dec_v, env_v;
  logic [ENV_W-1:0]        env;

  freq_downconverter #(.IN_W(IN_W), .OUT_W(MIX_W)) u_ddc (
    .clk, .rst_n, .ftw, .adc_i, .i_o(mix_i), .q_o(mix_q)
  );

  decimator #(.R(R), .IN_W(MIX_W), .OUT_W(DEC_W)) u_dec (
    .clk, .rst_n, .i_i(mix_i), .q_i(mix_q),
    .i_o(dec_i), .q_o(dec_q), .valid_o(dec_v)
  );

  envelope_detector #(.IN_W(DEC_W)) u_env (
    .clk, .rst_n, .valid_i(dec_v), .i_i(dec_i), .q_i(dec_q),
    .valid_o(env_v), .env_o(env)
  );

  lowpass_filter #(.W(ENV_W), .SHIFT(SHIFT)) u_lpf (
    .clk, .rst_n, .valid_i(env_v), .x_i(env),
    .valid_o(energy_valid), .y_o(energy)
  );

  binary_decision #(.W(ENV_W)) u_dec_bit (
    .clk, .rst_n, .valid_i(energy_valid), .energy_i(energy),
    .threshold, .bit_o(carrier)
  );
endmodule
