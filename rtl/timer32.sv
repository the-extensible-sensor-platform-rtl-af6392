// timer32: 32-bit down-counting timer tied to the system clock.
//
// The processor uses one timer as the interval timer for reading the
// temperature sensor and one as the 375 us sub-bit time reference while
// transmitting; the receiver uses one as its sample time reference.
// Registers (word offsets on the register bus):
//   0 CTRL   [0] enable, [1] auto-reload, [2] interrupt enable
//   1 LOAD   reload value; writing it also loads the counter
//   2 COUNT  current value (read only)
//   3 STATUS [0] expired flag, sticky; write 1 to clear
// When enabled the counter decrements once per clock. On the clock where it
// is 0 the expired flag is set and the counter is reloaded from LOAD (period
// LOAD+1 clocks) if auto-reload is on; otherwise the timer stops (enable
// clears). `irq` is the expired flag gated by the interrupt enable.
// The register layout is this design's own; the document gives only the
// timers' width, count and use.
module timer32
  import esp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  reg_req_t    req,
  output logic [31:0] rdata,
  output logic        irq
);
  logic        en, reload, irq_en, expired;
  logic [31:0] load, count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= 1'b0; reload <= 1'b0; irq_en <= 1'b0; expired <= 1'b0;
      load <= '0; count <= '0;
    end else begin
      if (en) begin
        if (count == '0) begin
          expired <= 1'b1;
          if (reload) count <= load;
          else        en    <= 1'b0;
        end else begin
          count <= count - 32'd1;
        end
      end
      if (req.sel && req.we) begin
        unique case (req.addr)
          4'd0: {irq_en, reload, en} <= req.wdata[2:0];
          4'd1: begin load <= req.wdata; count <= req.wdata; end
          4'd3: if (req.wdata[0]) expired <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = {29'd0, irq_en, reload, en};
      4'd1:    rdata = load;
      4'd2:    rdata = count;
      4'd3:    rdata = {31'd0, expired};
      default: rdata = '0;
    endcase
  end

  assign irq = expired & irq_en;
endmodule
