// esp_tx_node: the ESP sensor data transmitter (FPGA part).
//
// Around the processor's data bus sit the 32 KiB instruction and data RAM,
// two 32-bit timers (sensor interval timer and 375 us sub-bit reference),
// a GPIO port, the I2C master for the temperature sensor and the RF
// front-end, and the ASK transmit path: the ASK encoder and the DDS that
// produces the 10.7 MHz IF carrier as 14-bit samples for the DAC.
// The carrier is on when GPIO OUT[0] (the single enable line the software
// keys, as in the prototype) or the hardware encoder asks for it.
// The processor itself is outside this module: its data bus and its
// instruction fetch port are ports here.
// Peripheral indices (0x4000_0000 + 0x100 * index): 0 timer 0, 1 timer 1,
// 2 GPIO, 3 I2C, 4 ASK transmitter with registers
//   0 TX      write: send a frame with payload wdata; read: [0] busy
//   2 FTW     carrier frequency tuning word (reset: 10.7 MHz at 25 MHz)
// Timing: all logic runs on the 25 MHz system clock; `dac_o` follows the
// carrier enable by one clock.
// The set of blocks and their connections follow the prototype's block
// diagram; the address map, the register layouts and the hardware
// encoder/decoder path beside the software one are this design's own.
module esp_tx_node
  import esp_pkg::*;
#(
  parameter int unsigned DATA_BITS = 8,
  parameter int unsigned SUBBIT    = esp_pkg::SUBBIT_CYCLES,
  parameter int unsigned RAM_BYTES = 32768
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // processor data bus and instruction fetch
  input  bus_req_t                   bus_req,
  output bus_rsp_t                   bus_rsp,
  input  logic [31:0]                iaddr,
  output logic [31:0]                idata,
  output logic [1:0]                 timer_irq,
  // DAC
  output logic signed [SAMPLE_W-1:0] dac_o,
  // I2C (open drain: 1 pulls the line low)
  output logic                       scl_oe,
  output logic                       sda_oe,
  input  logic                       sda_i,
  // spare GPIO
  output logic [31:0]                gpio_o,
  input  logic [31:0]                gpio_i,
  output logic                       carrier_on
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
                    .rdata(prdata[PERIPH_TIMER0]), .irq(timer_irq[0]));
  timer32 u_timer1 (.clk, .rst_n, .req(preq[PERIPH_TIMER1]),
                    .rdata(prdata[PERIPH_TIMER1]), .irq(timer_irq[1]));

  gpio #(.WIDTH(32)) u_gpio (.clk, .rst_n, .req(preq[PERIPH_GPIO]),
                             .rdata(prdata[PERIPH_GPIO]), .gpio_o, .gpio_i);

  i2c_master u_i2c (.clk, .rst_n, .req(preq[PERIPH_I2C]),
                    .rdata(prdata[PERIPH_I2C]), .scl_oe, .sda_oe, .sda_i);

  // ---- ASK transmitter registers -------------------------------------------
  logic        enc_start, enc_busy, enc_carrier;
  logic [31:0] ftw;

  assign enc_start = preq[PERIPH_ASK].sel && preq[PERIPH_ASK].we &&
                     preq[PERIPH_ASK].addr == 4'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ftw <= FTW_10M7;
    else if (preq[PERIPH_ASK].sel && preq[PERIPH_ASK].we && preq[PERIPH_ASK].addr == 4'd2)
      ftw <= preq[PERIPH_ASK].wdata;
  end

  always_comb begin
    unique case (preq[PERIPH_ASK].addr)
      4'd0:    prdata[PERIPH_ASK] = {31'd0, enc_busy};
      4'd2:    prdata[PERIPH_ASK] = ftw;
      default: prdata[PERIPH_ASK] = '0;
    endcase
  end

  ask_encoder #(.DATA_BITS(DATA_BITS), .SUBBIT(SUBBIT)) u_enc (
    .clk, .rst_n, .start(enc_start),
    .data(preq[PERIPH_ASK].wdata[DATA_BITS-1:0]),
    .busy(enc_busy), .carrier_on(enc_carrier)
  );

  assign carrier_on = gpio_o[0] | enc_carrier;

  logic signed [SAMPLE_W-1:0] dds_cos;

  dds #(.OUT_W(SAMPLE_W)) u_dds (
    .clk, .rst_n, .en(carrier_on), .ftw, .sin_o(dac_o), .cos_o(dds_cos)
  );
endmodule
