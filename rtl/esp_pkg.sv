// esp_pkg: constants and types shared by the Extensible Sensor Platform RTL.
//
// Timing constants follow the prototype: a 25 MHz system clock, a 375 us
// "sub-bit" (9375 clocks), six sub-bits per data bit and a 13 sub-bit sync
// pattern. The carrier on/off patterns are those of the HT-680 style encoding
// (first sub-bit in the most significant position, 1 = carrier on). The
// register bus types, the address map and the payload width are choices of
// this design; the original prototype used the vendor processor bus.
package esp_pkg;

  // ---- system timing -------------------------------------------------------
  localparam int unsigned CLK_HZ          = 25_000_000;
  localparam int unsigned SUBBIT_CYCLES   = 9375;      // 375 us at 25 MHz
  localparam int unsigned SUBBITS_PER_BIT = 6;         // 2.25 ms bit time
  localparam int unsigned SYNC_LEN        = 13;        // 4.875 ms sync

  // ---- carrier on/off patterns (MSB is sent first, 1 = carrier on) --------
  localparam logic [SYNC_LEN-1:0]        SYNC_PATTERN = 13'b1011001011001;
  localparam logic [SUBBITS_PER_BIT-1:0] BIT0_PATTERN = 6'b011011;
  localparam logic [SUBBITS_PER_BIT-1:0] BIT1_PATTERN = 6'b001001;

  // ---- signal path ---------------------------------------------------------
  localparam int unsigned SAMPLE_W   = 14;             // DAC/ADC sample width
  localparam int unsigned DECIM      = 50;             // receiver decimation
  // 10.7 MHz / 25 MHz * 2^32, rounded
  localparam logic [31:0] FTW_10M7   = 32'd1838246003;

  // ---- peripheral register bus --------------------------------------------
  // One access per valid cycle; the node answers one clock later.
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;     // byte address
    logic [31:0] wdata;
    logic [3:0]  be;       // byte enables (RAM only)
  } bus_req_t;

  typedef struct packed {
    logic        ready;    // one-cycle pulse, one clock after valid
    logic [31:0] rdata;
  } bus_rsp_t;

  // Select/write/offset bundle given to one peripheral (word offset 0..15).
  typedef struct packed {
    logic        sel;
    logic        we;
    logic [3:0]  addr;
    logic [31:0] wdata;
  } reg_req_t;

  // Address map: RAM at 0x0000_0000..0x0000_7FFF; peripherals at
  // 0x4000_0000 + 0x100 * index.
  localparam int unsigned PERIPH_TIMER0 = 0;
  localparam int unsigned PERIPH_TIMER1 = 1;
  localparam int unsigned PERIPH_GPIO   = 2;
  localparam int unsigned PERIPH_I2C    = 3;
  localparam int unsigned PERIPH_ASK    = 4;

  // I2C master commands (CMD register bits [2:0]).
  typedef enum logic [2:0] {
    I2C_NOP   = 3'd0,
    I2C_START = 3'd1,   // (repeated) start, then send TXDATA as address byte
    I2C_WRITE = 3'd2,   // send TXDATA, receive ACK
    I2C_READ  = 3'd3,   // receive a byte, then send ACK (CMD[8]=0) or NACK
    I2C_STOP  = 3'd4
  } i2c_cmd_e;

endpackage
