// esp_top_tb: end-to-end test of the transmitter and receiver nodes at full
// size (25 MHz clock, 375 us sub-bits, 32 KiB RAMs, default parameters).
//
// The testbench plays both processors, the temperature sensor (an I2C slave
// model on the transmitter's bus) and the radio link: the receiver's ADC
// gets the transmitter's DAC samples halved, delayed by 37 clocks and with
// +-50 LSB noise. The transmitter program waits for its interval timer,
// reads the sensor over I2C and sends the whole-degree byte, three times
// through the hardware encoder; then it sends one frame by keying the
// carrier from software (GPIO OUT[0], timed by timer 1 set to 375 us, as
// the prototype did) and one such frame with a broken sync. The receiver
// program waits for the frame interrupt, reads the byte and turns the LED
// on above 27 degrees C, off otherwise.
// Checks: every reading arrives intact, the LED follows the threshold, the
// broken frame yields a sync failure and no data, the frame time is
// (13 + 6*8) * 9375 clocks, and each mechanism happened at least once.
module esp_top_tb;
  import esp_pkg::*;
  localparam logic [31:0] T0 = 32'h4000_0000, T1 = 32'h4000_0100, GP = 32'h4000_0200,
                          IIC = 32'h4000_0300, ASK = 32'h4000_0400;
  localparam logic [7:0]  LED_THRESHOLD = 8'd27;
  localparam string SYNC = "1011001011001";
  localparam string ZERO = "011011";
  localparam string ONE  = "001001";

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t tx_req, rx_req;
  bus_rsp_t tx_rsp, rx_rsp;
  logic [31:0] tx_idata, rx_idata, tx_gpio_o, rx_gpio_o;
  logic [1:0]  tx_tirq;
  logic        rx_tirq, rx_firq, rx_led, tx_carrier, rx_carrier;
  logic signed [13:0] tx_dac, rx_adc;
  logic tx_scl_oe, tx_sda_oe, rx_scl_oe, rx_sda_oe, s_oe, scl, sda;
  logic [15:0] temp;
  logic [7:0] last_cmd;
  int cmds, reads;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  esp_top dut (
    .clk, .rst_n,
    .tx_bus_req(tx_req), .tx_bus_rsp(tx_rsp), .tx_iaddr(32'd0), .tx_idata,
    .tx_timer_irq(tx_tirq), .tx_dac, .tx_scl_oe, .tx_sda_oe, .tx_sda_i(sda),
    .tx_gpio_o, .tx_gpio_i(32'd0), .tx_carrier_on(tx_carrier),
    .rx_bus_req(rx_req), .rx_bus_rsp(rx_rsp), .rx_iaddr(32'd0), .rx_idata,
    .rx_timer_irq(rx_tirq), .rx_frame_irq(rx_firq), .rx_adc,
    .rx_scl_oe, .rx_sda_oe, .rx_sda_i(rx_sda), .rx_led, .rx_gpio_o,
    .rx_gpio_i(31'd0), .rx_carrier);

  // temperature sensor and RF front-end on the transmitter's I2C bus; a
  // second instance of the same slave model, at address 0x60, stands in
  // for the front-end's tuning and gain registers (it keeps the last byte
  // written). The receiver's bus has a front-end only.
  logic f_oe, rf_oe, rx_scl, rx_sda;
  logic [7:0] tx_rf_last, rx_rf_last;
  int tx_rf_cmds, rx_rf_cmds, unused_reads [2];
  assign scl = ~tx_scl_oe;
  assign sda = ~(tx_sda_oe | s_oe | f_oe);
  ds1721_model sensor (.temp, .scl, .sda, .sda_oe(s_oe), .last_cmd, .cmds, .reads);
  ds1721_model #(.ADDR(7'h60)) tx_frontend (.temp(16'd0), .scl, .sda, .sda_oe(f_oe),
    .last_cmd(tx_rf_last), .cmds(tx_rf_cmds), .reads(unused_reads[0]));
  assign rx_scl = ~rx_scl_oe;
  assign rx_sda = ~(rx_sda_oe | rf_oe);
  ds1721_model #(.ADDR(7'h60)) rx_frontend (.temp(16'd0), .scl(rx_scl), .sda(rx_sda),
    .sda_oe(rf_oe), .last_cmd(rx_rf_last), .cmds(rx_rf_cmds), .reads(unused_reads[1]));

  // radio link: half amplitude, 37 clocks of delay, noise
  logic signed [13:0] dly [37];
  always @(posedge clk) begin
    dly[0] <= tx_dac;
    for (int k = 1; k < 37; k++) dly[k] <= dly[k-1];
    rx_adc <= (dly[36] >>> 1) + 14'(int'($urandom_range(0, 100)) - 50);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // ---- bus access for the two processors -----------------------------------
  task automatic tx_wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); tx_req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d, be: 4'hF};
    @(negedge clk); tx_req = '0;
  endtask
  task automatic tx_rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); tx_req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0, be: 4'hF};
    @(negedge clk); tx_req = '0; d = tx_rsp.rdata;
  endtask
  task automatic rx_wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); rx_req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d, be: 4'hF};
    @(negedge clk); rx_req = '0;
  endtask
  task automatic rx_rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); rx_req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0, be: 4'hF};
    @(negedge clk); rx_req = '0; d = rx_rsp.rdata;
  endtask

  // ---- mechanism counters ------------------------------------------------------
  int n_interval = 0, n_i2c_reads = 0, n_hw_frames = 0, n_sw_frames = 0,
      n_subbit_ticks = 0, n_rx_frames = 0, n_led_on = 0, n_led_off = 0,
      n_sync_fail = 0, n_rx_timer = 0, n_rf_tune = 0;

  // ---- transmitter program -----------------------------------------------------
  task automatic i2c(input i2c_cmd_e c, input logic [7:0] txd, input bit nack = 0);
    logic [31:0] st;
    tx_wr(IIC + 4, {24'd0, txd});
    tx_wr(IIC, {23'd0, nack, 5'd0, c});
    do tx_rd(IIC + 12, st); while (st[0]);
  endtask

  task automatic rx_i2c(input i2c_cmd_e c, input logic [7:0] txd);
    logic [31:0] st;
    rx_wr(IIC + 4, {24'd0, txd});
    rx_wr(IIC, {29'd0, c});
    do rx_rd(IIC + 12, st); while (st[0]);
  endtask

  task automatic read_sensor(output logic [7:0] t);
    logic [31:0] v;
    i2c(I2C_START, 8'h90); i2c(I2C_WRITE, 8'hAA);
    i2c(I2C_START, 8'h91); i2c(I2C_READ, 8'h00); tx_rd(IIC + 8, v);
    t = v[7:0];
    i2c(I2C_READ, 8'h00, 1); i2c(I2C_STOP, 8'h00);
    n_i2c_reads++;
  endtask

  // key one frame from software, one sub-bit per timer 1 expiry
  task automatic sw_send(input string p);
    logic [31:0] v;
    tx_wr(T1 + 4, SUBBIT_CYCLES - 1);
    tx_wr(T1, 32'b011);
    for (int k = 0; k < p.len(); k++) begin
      tx_wr(GP, (p[k] == "1") ? 32'h1 : 32'h0);
      do tx_rd(T1 + 12, v); while (!v[0]);
      tx_wr(T1 + 12, 1);
      n_subbit_ticks++;
    end
    tx_wr(GP, 0);
    tx_wr(T1, 0);
  endtask

  function automatic string frame(input logic [7:0] d);
    string s = SYNC;
    for (int i = 7; i >= 0; i--) s = {s, d[i] ? ONE : ZERO};
    return s;
  endfunction

  logic [7:0] sent [$];
  int frame_start, frame_len = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic [7:0] temps [3] = '{8'd25, 8'd30, 8'd20};
  logic tx_done = 1'b0;

  initial begin : tx_program
    logic [31:0] v;
    logic [7:0] t;
    tx_req = '0;
    temp = 16'h0000;
    wait (rst_n);
    // tune the transmitter front-end and set its gain over I2C
    i2c(I2C_START, 8'hC0); i2c(I2C_WRITE, 8'h37); i2c(I2C_WRITE, 8'h0C); i2c(I2C_STOP, 8'h00);
    tx_rd(IIC + 12, v);
    check(v[1] == 1'b0 && tx_rf_cmds == 2 && tx_rf_last == 8'h0C, "transmitter front-end tuned");
    n_rf_tune++;
    tx_wr(T0 + 4, 32'd49_999);          // 2 ms sensor interval
    tx_wr(T0, 32'b111);
    for (int r = 0; r < 3; r++) begin
      temp = {temps[r], 8'h80};
      wait (tx_tirq[0]); tx_wr(T0 + 12, 1); n_interval++;
      read_sensor(t);
      check(t == temps[r], $sformatf("sensor read %0d", t));
      sent.push_back(t);
      tx_wr(ASK, {24'd0, t});
      frame_start = cyc;
      do tx_rd(ASK, v); while (v[0]);
      frame_len = cyc - frame_start;
      n_hw_frames++;
      $display("[%0d] hw frame %0d sent", cyc, t);
      repeat (5 * SUBBIT_CYCLES) @(negedge clk);   // idle carrier-off gap
    end
    tx_wr(T0, 0);
    // software-keyed frame, then a frame with a broken sync
    sent.push_back(8'd34);
    sw_send(frame(8'd34));
    n_sw_frames++;
    repeat (5 * SUBBIT_CYCLES) @(negedge clk);
    sw_send({"1011001111001", frame(8'd99).substr(13, 13 + 47)});
    repeat (5 * SUBBIT_CYCLES) @(negedge clk);
    tx_done = 1'b1;
  end

  // ---- receiver program --------------------------------------------------------
  logic [7:0] got;
  initial begin : rx_program
    logic [31:0] v;
    rx_req = '0;
    wait (rst_n);
    // tune the receiver front-end and set its gain over I2C
    rx_i2c(I2C_START, 8'hC0); rx_i2c(I2C_WRITE, 8'h37); rx_i2c(I2C_WRITE, 8'h0A);
    rx_i2c(I2C_STOP, 8'h00);
    rx_rd(IIC + 12, v);
    check(v[1] == 1'b0 && rx_rf_cmds == 2 && rx_rf_last == 8'h0A, "receiver front-end tuned");
    n_rf_tune++;
    rx_wr(T0 + 4, 32'd999_999);         // 40 ms housekeeping timer
    rx_wr(T0, 32'b111);
    forever begin
      wait (rx_firq || tx_done || rx_tirq);
      if (tx_done) break;
      if (rx_tirq) begin n_rx_timer++; rx_wr(T0 + 12, 1); continue; end
      rx_rd(ASK + 12, v);
      check(v[1] == 1'b0, "no bit error");
      rx_rd(ASK + 16, v);
      got = v[7:0];
      n_rx_frames++;
      check(sent.size() > 0, "a frame was sent");
      if (sent.size() > 0) begin
        logic [7:0] e;
        e = sent.pop_front();
        check(got == e, $sformatf("received %0d, sent %0d", got, e));
      end
      rx_wr(ASK + 12, 1);
      rx_wr(GP, got > LED_THRESHOLD ? 32'h1 : 32'h0);
      check(rx_led == (got > LED_THRESHOLD), "LED follows threshold");
      if (rx_led) n_led_on++; else n_led_off++;
    end
    rx_rd(ASK + 12, v);
    if (v[3]) n_sync_fail++;
    check(v[3] == 1'b1, "broken sync reported");
    check(sent.size() == 0, "every frame received");
    check(n_rx_frames == 4, $sformatf("%0d frames received, 4 sent", n_rx_frames));
    check(frame_len >= 61 * SUBBIT_CYCLES && frame_len <= 61 * SUBBIT_CYCLES + 4,
          $sformatf("frame time %0d clocks", frame_len));
    check(n_interval >= 1, "interval timer");
    check(n_i2c_reads >= 1, "I2C sensor reads");
    check(n_hw_frames >= 1, "hardware-encoded frames");
    check(n_sw_frames >= 1, "software-keyed frames");
    check(n_subbit_ticks >= 61, "sub-bit timer ticks");
    check(n_led_on >= 1, "LED turned on");
    check(n_led_off >= 1, "LED turned off");
    check(n_sync_fail >= 1, "sync failure");
    check(n_rx_timer >= 1, "receiver timer");
    check(n_rf_tune == 2, "front-ends tuned over I2C");
    $display("mechanisms: interval=%0d i2c_reads=%0d hw_frames=%0d sw_frames=%0d subbit_ticks=%0d",
             n_interval, n_i2c_reads, n_hw_frames, n_sw_frames, n_subbit_ticks);
    $display("            rx_frames=%0d led_on=%0d led_off=%0d sync_fail=%0d rx_timer=%0d frame_len=%0d",
             n_rx_frames, n_led_on, n_led_off, n_sync_fail, n_rx_timer, frame_len);
    $display("            rf_tuning=%0d", n_rf_tune);
    $display("simulated %0d clocks", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
