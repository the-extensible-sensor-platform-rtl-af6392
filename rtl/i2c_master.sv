// i2c_master: I2C bus master controller for the shared sensor/radio bus.
//
// The processor reads the temperature sensor and tunes the RF front-end over
// one I2C bus at the 100 kHz standard rate with 7-bit addressing. This
// controller executes one byte-level command at a time:
//   START : (repeated) start condition, then sends TXDATA as the address
//           byte {addr[6:0], r/w} and samples the slave's ACK
//   WRITE : sends TXDATA and samples ACK
//   READ  : receives a byte into RXDATA, then sends ACK (CMD[8]=0) or NACK
//   STOP  : stop condition; the bus is then free
// Registers (word offsets): 0 CMD (write starts a command), 1 TXDATA,
// 2 RXDATA, 3 STATUS [0] busy, [1] last ACK bit seen (1 = NACK), [2] bus held.
// Every SCL period is four quarters of QUARTER clocks: SCL low for two
// quarters (SDA changes at the start of the second, a quarter after SCL
// falls, for hold time), high for two (SDA is sampled at the start of the
// fourth). At the default 25 MHz clock a quarter is 63 clocks, so SCL runs
// at 99.2 kHz. Outputs are open-drain enables:
// scl_oe/sda_oe = 1 pulls the line low. There is no clock stretching or
// arbitration (single master). The rate and addressing follow the document;
// the command set and registers are this design's own.
module i2c_master
  import esp_pkg::*;
#(
  parameter int unsigned CLK_FREQ = esp_pkg::CLK_HZ,
  parameter int unsigned SCL_FREQ = 100_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  reg_req_t    req,
  output logic [31:0] rdata,
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_i
);
  // quarter period, rounded up so the bus never runs faster than SCL_FREQ
  localparam int unsigned QUARTER = (CLK_FREQ + 4 * SCL_FREQ - 1) / (4 * SCL_FREQ);
  localparam int unsigned QW      = $clog2(QUARTER + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BYTE, S_TAIL, S_STOP} state_e;

  state_e         state;
  logic [QW-1:0]  qcnt;       // clocks within the quarter
  logic [1:0]     quarter;    // quarter within the bit / condition
  logic [3:0]     bitn;       // bit within the 9-bit byte frame
  logic [8:0]     tx_sh;      // bits to drive (1 = release)
  logic [8:0]     rx_sh;      // bits sampled
  logic [7:0]     txdata, rxdata;
  logic           nack, held, is_read;
  logic           qtick;

  assign qtick = (qcnt == QW'(QUARTER - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; qcnt <= '0; quarter <= '0; bitn <= '0;
      tx_sh <= '1; rx_sh <= '0; txdata <= '0; rxdata <= '0;
      nack <= 1'b0; held <= 1'b0; is_read <= 1'b0;
      scl_oe <= 1'b0; sda_oe <= 1'b0;
    end else begin
      if (req.sel && req.we && req.addr == 4'd1) txdata <= req.wdata[7:0];

      if (state == S_IDLE) begin
        qcnt <= '0;
        if (req.sel && req.we && req.addr == 4'd0) begin
          unique case (i2c_cmd_e'(req.wdata[2:0]))
            I2C_START: begin
              state   <= S_START;
              quarter <= held ? 2'd0 : 2'd1;   // free bus: SCL already high
              tx_sh   <= {txdata, 1'b1};
              is_read <= 1'b0;
            end
            I2C_WRITE: if (held) begin
              state <= S_BYTE; quarter <= '0; bitn <= '0;
              tx_sh <= {txdata, 1'b1}; is_read <= 1'b0;
            end
            I2C_READ: if (held) begin
              state <= S_BYTE; quarter <= '0; bitn <= '0;
              tx_sh <= {8'hFF, req.wdata[8]}; is_read <= 1'b1;
            end
            I2C_STOP: if (held) begin
              state <= S_STOP; quarter <= '0;
            end
            default: ;
          endcase
        end
      end else begin
        qcnt <= qtick ? '0 : qcnt + QW'(1);
        unique case (state)
          // [SCL low, SDA rel] [SCL high, SDA rel] [SCL high, SDA low] x2
          S_START: begin
            unique case (quarter)
              2'd0: begin scl_oe <= 1'b1; sda_oe <= 1'b0; end
              2'd1: begin scl_oe <= 1'b0; sda_oe <= 1'b0; end
              default: begin scl_oe <= 1'b0; sda_oe <= 1'b1; end
            endcase
            if (qtick) begin
              quarter <= quarter + 2'd1;
              if (quarter == 2'd3) begin
                state <= S_BYTE; quarter <= '0; bitn <= '0; held <= 1'b1;
              end
            end
          end
          S_BYTE: begin
            scl_oe <= (quarter < 2'd2);
            if (quarter == 2'd1) sda_oe <= ~tx_sh[8];
            if (qtick) begin
              quarter <= quarter + 2'd1;
              if (quarter == 2'd2) rx_sh <= {rx_sh[7:0], sda_i};
              if (quarter == 2'd3) begin
                tx_sh <= {tx_sh[7:0], 1'b1};
                if (bitn == 4'd8) begin
                  state  <= S_TAIL;
                  scl_oe <= 1'b1;             // hold SCL low between bytes
                  if (is_read) rxdata <= rx_sh[8:1];
                  else         nack   <= rx_sh[0];
                end
                bitn <= bitn + 4'd1;
              end
            end
          end
          // one more quarter of SCL low after a byte, so that SCL stays low
          // for at least two quarters before the next command raises it
          S_TAIL: begin
            scl_oe <= 1'b1;
            if (qtick) state <= S_IDLE;
          end
          // [SCL low, SDA low] [SCL high, SDA low] [SCL high, SDA rel] x2
          S_STOP: begin
            unique case (quarter)
              2'd0: begin scl_oe <= 1'b1; sda_oe <= 1'b1; end
              2'd1: begin scl_oe <= 1'b0; sda_oe <= 1'b1; end
              default: begin scl_oe <= 1'b0; sda_oe <= 1'b0; end
            endcase
            if (qtick) begin
              quarter <= quarter + 2'd1;
              if (quarter == 2'd3) begin state <= S_IDLE; held <= 1'b0; end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    unique case (req.addr)
      4'd1:    rdata = {24'd0, txdata};
      4'd2:    rdata = {24'd0, rxdata};
      4'd3:    rdata = {29'd0, held, nack, state != S_IDLE};
      default: rdata = '0;
    endcase
  end
endmodule
