// ask_encoder: HT-680 style carrier on/off encoder for the ASK transmitter.
//
// On `start` it latches `data` and keys the carrier through one frame: the
// 13 sub-bit sync pattern (on off on on off off on off on on off off on),
// immediately followed by DATA_BITS data bits, most significant first, each
// six sub-bits long: logic 0 = off on on off on on, logic 1 = off off on off
// off on. One sub-bit lasts SUBBIT clocks (375 us = 9375 clocks at 25 MHz),
// so a bit lasts 2.25 ms and the sync 4.875 ms. `carrier_on` goes high on
// the clock after `start` and the frame takes
// (13 + 6 * DATA_BITS) * SUBBIT clocks; `busy` is high for exactly that
// long, and `start` is ignored while busy. The carrier is off between frames.
// In the prototype the processor's program produced this sequence with a
// timer and the DDS enable line; here it is offered as hardware so that the
// node can transmit without software timing. The patterns and timing follow
// the document; the payload width is this design's choice.
module ask_encoder
  import esp_pkg::*;
#(
  parameter int unsigned DATA_BITS = 8,
  parameter int unsigned SUBBIT    = esp_pkg::SUBBIT_CYCLES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [DATA_BITS-1:0] data,
  output logic                 busy,
  output logic                 carrier_on
);
  localparam int unsigned FRAME = SYNC_LEN + SUBBITS_PER_BIT * DATA_BITS;
  localparam int unsigned CW    = $clog2(SUBBIT);
  localparam int unsigned NW    = $clog2(FRAME + 1);

  logic [FRAME-1:0] frame_sh;   // remaining sub-bits, MSB is the current one
  logic [CW-1:0]    tcnt;       // clocks into the current sub-bit
  logic [NW-1:0]    left;       // sub-bits left, including the current one

  function automatic logic [FRAME-1:0] build_frame(logic [DATA_BITS-1:0] d);
    logic [FRAME-1:0] f;
    f = FRAME'(SYNC_PATTERN) << (FRAME - SYNC_LEN);
    for (int i = 0; i < DATA_BITS; i++)
      f[FRAME - SYNC_LEN - SUBBITS_PER_BIT * i - 1 -: SUBBITS_PER_BIT] =
        d[DATA_BITS - 1 - i] ? BIT1_PATTERN : BIT0_PATTERN;
    return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_sh <= '0; tcnt <= '0; left <= '0;
    end else if (left == '0) begin
      if (start) begin
        frame_sh <= build_frame(data);
        left     <= NW'(FRAME);
        tcnt     <= '0;
      end
    end else if (tcnt == CW'(SUBBIT - 1)) begin
      tcnt     <= '0;
      frame_sh <= frame_sh << 1;
      left     <= left - NW'(1);
    end else begin
      tcnt <= tcnt + CW'(1);
    end
  end

  assign busy       = (left != '0);
  assign carrier_on = busy & frame_sh[FRAME-1];
endmodule
