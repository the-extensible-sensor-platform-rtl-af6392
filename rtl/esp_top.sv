// esp_top: the two prototype ESP nodes, transmitter and receiver.
//
// The Extensible Sensor Platform prototype is a pair of FPGA nodes: one reads
// a temperature sensor over I2C and sends the reading by on/off keying of a
// 10.7 MHz IF carrier; the other receives the IF, recovers the carrier on/off
// stream, decodes the reading and drives an LED. This top holds both nodes
// side by side, each with its own processor data bus, instruction port, I2C
// pins and converter port. The analog path between them (DAC, 900 MHz RF
// transceivers, air, ADC) and the processors are outside: `tx_dac` leaves
// and `rx_adc` enters as 14-bit signed samples at the 25 MHz clock.
// The split into two nodes, their blocks and the 25 MHz clock follow the
// prototype; the port bundles (processor bus structs, open-drain I2C enables)
// are this design's own.
module esp_top
  import esp_pkg::*;
#(
  parameter int unsigned DATA_BITS = 8,
  parameter int unsigned SUBBIT    = esp_pkg::SUBBIT_CYCLES,
  parameter int unsigned RAM_BYTES = 32768,
  parameter int unsigned THRESHOLD = 50_000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // transmitter node
  input  bus_req_t                   tx_bus_req,
  output bus_rsp_t                   tx_bus_rsp,
  input  logic [31:0]                tx_iaddr,
  output logic [31:0]                tx_idata,
  output logic [1:0]                 tx_timer_irq,
  output logic signed [SAMPLE_W-1:0] tx_dac,
  output logic                       tx_scl_oe,
  output logic                       tx_sda_oe,
  input  logic                       tx_sda_i,
  output logic [31:0]                tx_gpio_o,
  input  logic [31:0]                tx_gpio_i,
  output logic                       tx_carrier_on,
  // receiver node
  input  bus_req_t                   rx_bus_req,
  output bus_rsp_t                   rx_bus_rsp,
  input  logic [31:0]                rx_iaddr,
  output logic [31:0]                rx_idata,
  output logic                       rx_timer_irq,
  output logic                       rx_frame_irq,
  input  logic signed [SAMPLE_W-1:0] rx_adc,
  output logic                       rx_scl_oe,
  output logic                       rx_sda_oe,
  input  logic                       rx_sda_i,
  output logic                       rx_led,
  output logic [31:0]                rx_gpio_o,
  input  logic [30:0]                rx_gpio_i,
  output logic                       rx_carrier
);
  esp_tx_node #(.DATA_BITS(DATA_BITS), .SUBBIT(SUBBIT), .RAM_BYTES(RAM_BYTES)) u_tx (
    .clk, .rst_n,
    .bus_req(tx_bus_req), .bus_rsp(tx_bus_rsp), .iaddr(tx_iaddr), .idata(tx_idata),
    .timer_irq(tx_timer_irq), .dac_o(tx_dac),
    .scl_oe(tx_scl_oe), .sda_oe(tx_sda_oe), .sda_i(tx_sda_i),
    .gpio_o(tx_gpio_o), .gpio_i(tx_gpio_i), .carrier_on(tx_carrier_on)
  );

  esp_rx_node #(.DATA_BITS(DATA_BITS), .SUBBIT(SUBBIT), .RAM_BYTES(RAM_BYTES),
                .THRESHOLD(THRESHOLD)) u_rx (
    .clk, .rst_n,
    .bus_req(rx_bus_req), .bus_rsp(rx_bus_rsp), .iaddr(rx_iaddr), .idata(rx_idata),
    .timer_irq(rx_timer_irq), .frame_irq(rx_frame_irq), .adc_i(rx_adc),
    .scl_oe(rx_scl_oe), .sda_oe(rx_sda_oe), .sda_i(rx_sda_i),
    .led(rx_led), .gpio_o(rx_gpio_o), .gpio_i(rx_gpio_i), .carrier(rx_carrier)
  );
endmodule
