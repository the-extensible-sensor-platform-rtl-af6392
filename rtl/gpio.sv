// gpio: bit-wise binary input/output for control.
//
// Register 0 (OUT) holds the output bits; register 1 (IN) reads the input
// bits through a two-flop synchronizer. On the transmitter, OUT[0] is the
// carrier enable of the DDS; on the receiver, OUT[0] drives the LED and
// IN[0] is the recovered data bit. Writes take effect on the next clock;
// reads are combinational from the registers. Widths and layout are this
// design's choice.
module gpio
  import esp_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_req_t         req,
  output logic [31:0]      rdata,
  output logic [WIDTH-1:0] gpio_o,
  input  logic [WIDTH-1:0] gpio_i
);
  logic [WIDTH-1:0] sync1, sync2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpio_o <= '0;
      sync1  <= '0;
      sync2  <= '0;
    end else begin
      sync1 <= gpio_i;
      sync2 <= sync1;
      if (req.sel && req.we && req.addr == 4'd0) gpio_o <= req.wdata[WIDTH-1:0];
    end
  end

  always_comb begin
    unique case (req.addr)
      4'd0:    rdata = 32'(gpio_o);
      4'd1:    rdata = 32'(sync2);
      default: rdata = '0;
    endcase
  end
endmodule
