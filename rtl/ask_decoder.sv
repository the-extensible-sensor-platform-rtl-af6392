// ask_decoder: finds the sync pattern and decodes the data bits.
//
// Input is the recovered carrier on/off stream. In IDLE the decoder waits
// for a rising edge (carrier off to on): the first sync sub-bit is a carrier
// on. It then samples the stream in the middle of each sub-bit, SUBBIT/2
// clocks after the edge and every SUBBIT clocks after that. The first 13
// samples must equal the sync pattern; at the first sample that differs
// `sync_fail` pulses and the decoder returns to IDLE at once, so a false
// start (noise, or joining in the middle of a frame) costs little time. The next 6 * DATA_BITS samples are decoded in
// groups of six, first bit most significant: off on on off on on is 0, off
// off on off off on is 1. A group that matches neither is decoded by its
// second sub-bit (on = 0) and sets `bit_err` for the frame. At the end of
// the frame `data` is updated and `frame_valid` pulses for one clock.
// Sampling in mid sub-bit tolerates edge shifts of almost half a sub-bit
// (187 us) from filter delay. In the prototype the processor did this in
// software with a timer; the patterns and times follow the document, the
// hardware form is this design's.
module ask_decoder
  import esp_pkg::*;
#(
  parameter int unsigned DATA_BITS = 8,
  parameter int unsigned SUBBIT    = esp_pkg::SUBBIT_CYCLES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 carrier,
  output logic [DATA_BITS-1:0] data,
  output logic                 frame_valid,
  output logic                 bit_err,
  output logic                 sync_fail
);
  localparam int unsigned CW = $clog2(SUBBIT);

  typedef enum logic [1:0] {D_IDLE, D_SYNC, D_DATA} state_e;

  state_e                     state;
  logic                       prev;
  logic [CW-1:0]              tcnt;
  logic [3:0]                 nsub;      // samples taken in the sync / group
  logic [$clog2(DATA_BITS+1)-1:0] nbit;  // data bits finished
  logic [SUBBITS_PER_BIT-2:0] shreg;     // last samples of the group
  logic [DATA_BITS-1:0]       dsh;
  logic                       err;
  logic [SUBBITS_PER_BIT-1:0] grp;
  logic                       grp_bit, grp_bad;

  // the group including the sample taken this clock
  assign grp     = {shreg[SUBBITS_PER_BIT-2:0], carrier};
  assign grp_bit = (grp == BIT1_PATTERN) ? 1'b1 :
                   (grp == BIT0_PATTERN) ? 1'b0 : ~grp[SUBBITS_PER_BIT-2];
  assign grp_bad = (grp != BIT1_PATTERN) && (grp != BIT0_PATTERN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE; prev <= 1'b1; tcnt <= '0; nsub <= '0; nbit <= '0;
      shreg <= '0; dsh <= '0; err <= 1'b0;
      data <= '0; frame_valid <= 1'b0; bit_err <= 1'b0; sync_fail <= 1'b0;
    end else begin
      prev        <= carrier;
      frame_valid <= 1'b0;
      sync_fail   <= 1'b0;
      unique case (state)
        D_IDLE: if (carrier && !prev) begin
          state <= D_SYNC;
          tcnt  <= CW'(SUBBIT / 2 + 1);  // the edge clock counts as one
          nsub  <= '0;
          shreg <= '0;
        end
        default: begin
          if (tcnt == CW'(SUBBIT - 1)) begin
            tcnt  <= '0;
            shreg <= {shreg[SUBBITS_PER_BIT-3:0], carrier};
            nsub  <= nsub + 4'd1;
            if (state == D_SYNC) begin
              if (carrier != SYNC_PATTERN[SYNC_LEN - 1 - int'(nsub)]) begin
                state <= D_IDLE; sync_fail <= 1'b1;      // give up at once
              end else if (nsub == 4'(SYNC_LEN - 1)) begin
                state <= D_DATA; nsub <= '0; nbit <= '0; err <= 1'b0;
              end
            end else if (nsub == 4'(SUBBITS_PER_BIT - 1)) begin
              nsub <= '0;
              dsh  <= {dsh[DATA_BITS-2:0], grp_bit};
              err  <= err | grp_bad;
              nbit <= nbit + 1'b1;
              if (nbit == ($bits(nbit))'(DATA_BITS - 1)) begin
                state       <= D_IDLE;
                data        <= {dsh[DATA_BITS-2:0], grp_bit};
                bit_err     <= err | grp_bad;
                frame_valid <= 1'b1;
              end
            end
          end else begin
            tcnt <= tcnt + CW'(1);
          end
        end
      endcase
    end
  end
endmodule
