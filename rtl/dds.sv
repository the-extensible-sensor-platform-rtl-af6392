// dds: direct digital synthesizer producing the 10.7 MHz IF carrier.
//
// A 32-bit phase accumulator advances by the frequency tuning word `ftw`
// every clock; its top PHASE_LUT_W bits address a full-cycle sine table of
// OUT_W-bit signed samples. A second read, a quarter cycle ahead, gives the
// cosine, which the receiver's downconverter uses as its local oscillator.
// When `en` is low the outputs are zero (carrier off) and the phase keeps
// running, so keying the carrier does not restart the sinusoid.
//
// Timing: outputs are registered, one clock after the phase they belong to.
// With a 25 MHz clock and ftw = FTW_10M7 the output is a 10.7 MHz sinusoid
// of 14-bit fixed point samples, as in the prototype, where this unit was a
// vendor black box. Table size and accumulator width are this design's
// choices; the table is computed at elaboration from $sin.
module dds #(
  parameter int unsigned PHASE_W     = 32,
  parameter int unsigned PHASE_LUT_W = 10,
  parameter int unsigned OUT_W       = esp_pkg::SAMPLE_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [PHASE_W-1:0]      ftw,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o
);
  localparam int unsigned DEPTH = 2 ** PHASE_LUT_W;
  typedef logic signed [OUT_W-1:0] table_t [DEPTH];

  // amplitude (2^(OUT_W-1) - 1) * sin(2*pi*i/DEPTH), rounded
  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++)
      t[i] = OUT_W'($rtoi($floor(((2.0 ** (OUT_W - 1)) - 1.0) *
                    $sin(2.0 * 3.141592653589793 * i / DEPTH) + 0.5)));
    return t;
  endfunction

  localparam table_t SINE = make_table();

  logic [PHASE_W-1:0]     phase;
  logic [PHASE_LUT_W-1:0] idx_s, idx_c;

  assign idx_s = phase[PHASE_W-1 -: PHASE_LUT_W];
  assign idx_c = idx_s + PHASE_LUT_W'(DEPTH / 4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      sin_o <= '0;
      cos_o <= '0;
    end else begin
      phase <= phase + ftw;
      sin_o <= en ? SINE[idx_s] : '0;
      cos_o <= en ? SINE[idx_c] : '0;
    end
  end
endmodule
