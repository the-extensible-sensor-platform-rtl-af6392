// esp_rx_node: the ESP sensor data receiver (FPGA part).
//
// Around the processor's data bus sit the 32 KiB instruction and data RAM,
// one 32-bit timer (sample time reference), a GPIO port whose OUT[0] drives
// the LED and whose IN[0] reads the recovered data bit, the I2C master for
// tuning and gain control of the RF front-end, and the ASK data receiver
// fed by the ADC's 14-bit samples of the 10.7 MHz IF. The recovered carrier
// on/off stream also goes to a hardware sync/bit decoder.
// The processor itself is outside this module: its data bus and its
// instruction fetch port are ports here.
// Peripheral indices (0x4000_0000 + 0x100 * index): 0 timer, 2 GPIO, 3 I2C,
// 4 ASK receiver with registers
//   0 THRESH  decision threshold (reset: THRESHOLD)
//   1 ENERGY  low pass filter output (read only)
//   2 FTW     local oscillator tuning word (reset: 10.7 MHz at 25 MHz)
//   3 STATUS  [0] frame received (sticky, write 1 to clear), [1] bit error
//             in that frame, [2] carrier now, [3] sync failure seen (sticky,
//             write 1 to bit 3 to clear)
//   4 DATA    payload of the last frame
// `frame_irq` is STATUS[0]. Index 1 is unused (the receiver has one timer).
// The set of blocks and their connections follow the prototype's block
// diagram; the address map, the register layouts and the hardware
// encoder/decoder path beside the software one are this design's own.
module esp_rx_node
  import esp_pkg::*;
#(
  parameter int unsigned DATA_BITS = 8,
  parameter int unsigned SUBBIT    = esp_pkg::SUBBIT_CYCLES,
  parameter int unsigned RAM_BYTES = 32768,
  parameter int unsigned THRESHOLD = 50_000,
  localparam int unsigned ENV_W    = SAMPLE_W + 2 + $clog2(DECIM)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // processor data bus and instruction fetch
  input  bus_req_t                   bus_req,
  output bus_rsp_t                   bus_rsp,
  input  logic [31:0]                iaddr,
  output logic [31:0]                idata,
  output logic                       timer_irq,
  output logic                       frame_irq,
  // ADC
  input  logic signed [SAMPLE_W-1:0] adc_i,
  // I2C (open drain: 1 pulls the line low)
  output logic                       scl_oe,
  output logic                       sda_oe,
  input  logic                       sda_i,
  // LED and spare GPIO
  output logic                       led,
  output logic [31:0]                gpio_o,
  input  logic [30:0]                gpio_i,
  output logic                       carrier
);
  localparam int unsigned NP = 5;

  reg_req_t    preq   [NP];
  logic [31:0] prdata [NP];

  logic        ram_en, ram_we;
  logic [3:0]  ram_be;
  logic [31:0] ram_addr, ram_wdata, ram_rdata;

  esp_bus_decoder #(.NPERIPH(NP)) u_bus (
    .clk, .rst_n, .bus_req, .bus_rsp,
    .ram_en, .ram_we, .ram_be, .ram_addr, .ram_wdata, .ram_rdata,
    .preq, .prdata
  );

  ram_32k #(.BYTES(RAM_BYTES)) u_ram (
    .clk, .iaddr, .idata,
    .den(ram_en), .dwe(ram_we), .dbe(ram_be), .daddr(ram_addr),
    .dwdata(ram_wdata), .drdata(ram_rdata)
  );

  timer32 u_timer0 (.clk, .rst_n, .req(preq[PERIPH_TIMER0]),
                    .rdata(prdata[PERIPH_TIMER0]), .irq(timer_irq));
  assign prdata[PERIPH_TIMER1] = '0;

  gpio #(.WIDTH(32)) u_gpio (.clk, .rst_n, .req(preq[PERIPH_GPIO]),
                             .rdata(prdata[PERIPH_GPIO]), .gpio_o,
                             .gpio_i({gpio_i, carrier}));
  assign led = gpio_o[0];

  i2c_master u_i2c (.clk, .rst_n, .req(preq[PERIPH_I2C]),
                    .rdata(prdata[PERIPH_I2C]), .scl_oe, .sda_oe, .sda_i);

  // ---- ASK receiver and its registers --------------------------------------
  reg_req_t             areq;
  logic [ENV_W-1:0]     thresh, energy;
  logic [31:0]          ftw;
  logic                 energy_valid;
  logic [DATA_BITS-1:0] rx_data;
  logic                 frame_valid, bit_err, sync_fail;
  logic                 pending, err_q, sync_seen;

  assign areq = preq[PERIPH_ASK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thresh <= ENV_W'(THRESHOLD); ftw <= FTW_10M7;
      pending <= 1'b0; err_q <= 1'b0; sync_seen <= 1'b0;
    end else begin
      if (areq.sel && areq.we) begin
        unique case (areq.addr)
          4'd0: thresh <= areq.wdata[ENV_W-1:0];
          4'd2: ftw    <= areq.wdata;
          4'd3: begin
            if (areq.wdata[0]) pending   <= 1'b0;
            if (areq.wdata[3]) sync_seen <= 1'b0;
          end
          default: ;
        endcase
      end
      if (frame_valid) begin pending <= 1'b1; err_q <= bit_err; end
      if (sync_fail) sync_seen <= 1'b1;
    end
  end

  always_comb begin
    unique case (areq.addr)
      4'd0:    prdata[PERIPH_ASK] = 32'(thresh);
      4'd1:    prdata[PERIPH_ASK] = 32'(energy);
      4'd2:    prdata[PERIPH_ASK] = ftw;
      4'd3:    prdata[PERIPH_ASK] = {28'd0, sync_seen, carrier, err_q, pending};
      4'd4:    prdata[PERIPH_ASK] = 32'(rx_data);
      default: prdata[PERIPH_ASK] = '0;
    endcase
  end

  assign frame_irq = pending;

  ask_receiver #(.IN_W(SAMPLE_W), .R(DECIM)) u_rx (
    .clk, .rst_n, .ftw, .adc_i, .threshold(thresh),
    .energy, .energy_valid, .carrier
  );

  ask_decoder #(.DATA_BITS(DATA_BITS), .SUBBIT(SUBBIT)) u_dec (
    .clk, .rst_n, .carrier, .data(rx_data), .frame_valid, .bit_err, .sync_fail
  );
endmodule
