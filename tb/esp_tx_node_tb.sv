// esp_tx_node_tb: checks the transmitter node through its processor bus.
//
// The testbench plays the processor. It checks RAM access on the data bus
// and the instruction port, both timers' periods and interrupts, the GPIO
// carrier enable (DAC samples nonzero only while it is set), the I2C read
// of a temperature sensor model, the carrier tuning word register, an
// unmapped access, and one hardware-encoded frame: the carrier in the middle
// of each sub-bit must follow the sync and bit tables (text below), with
// the DAC silent while off. A short sub-bit (SUBBIT = 40) keeps it quick.
module esp_tx_node_tb;
  import esp_pkg::*;
  localparam int SUBBIT = 40;
  localparam string SYNC = "1011001011001";
  localparam string ZERO = "011011";
  localparam string ONE  = "001001";
  localparam logic [31:0] T0 = 32'h4000_0000, T1 = 32'h4000_0100, GP = 32'h4000_0200,
                          IIC = 32'h4000_0300, ASK = 32'h4000_0400;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  logic [31:0] iaddr, idata, gpio_o, v;
  logic [1:0] irq;
  logic signed [13:0] dac;
  logic scl_oe, sda_oe, s_oe, scl, sda, carrier;
  logic [7:0] last_cmd;
  int cmds, reads, checks = 0, failures = 0;

  always #20 clk = ~clk;

  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | s_oe);

  esp_tx_node #(.SUBBIT(SUBBIT)) dut (
    .clk, .rst_n, .bus_req(req), .bus_rsp(rsp), .iaddr, .idata, .timer_irq(irq),
    .dac_o(dac), .scl_oe, .sda_oe, .sda_i(sda), .gpio_o, .gpio_i(32'hCAFE_0000),
    .carrier_on(carrier));

  ds1721_model sensor (.temp(16'h1A80), .scl, .sda, .sda_oe(s_oe), .last_cmd, .cmds, .reads);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk); req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d, be: be};
    @(negedge clk); req = '0;
    check(rsp.ready, "write answered");
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0, be: 4'hF};
    @(negedge clk); req = '0;
    check(rsp.ready, "read answered");
    d = rsp.rdata;
  endtask
  task automatic i2c(input i2c_cmd_e c, input logic [7:0] tx, input bit nack = 0);
    logic [31:0] st;
    wr(IIC + 4, {24'd0, tx});
    wr(IIC, {23'd0, nack, 5'd0, c});
    do rd(IIC + 12, st); while (st[0]);
  endtask

  int cyc = 0, t0, t1;
  always @(posedge clk) cyc++;

  string exp;
  int maxabs;
  initial begin
    req = '0; iaddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // RAM
    wr(32'h0000_1000, 32'hDEAD_BEEF);
    wr(32'h0000_1000, 32'h0000_5500, 4'b0010);
    rd(32'h0000_1000, v); check(v == 32'hDEAD_55EF, "RAM data port");
    iaddr = 32'h0000_1000; @(negedge clk); @(negedge clk);
    check(idata == 32'hDEAD_55EF, "RAM instruction port");
    // timers
    wr(T0 + 4, 32'd49); wr(T0, 32'b111);
    wr(T1 + 4, 32'd19); wr(T1, 32'b111);
    @(posedge irq[1]); t0 = cyc; wr(T1 + 12, 1); @(posedge irq[1]); t1 = cyc;
    check(t1 - t0 == 20, $sformatf("timer 1 period %0d", t1 - t0));
    @(posedge irq[0]); t0 = cyc; wr(T0 + 12, 1); @(posedge irq[0]); t1 = cyc;
    check(t1 - t0 == 50, $sformatf("timer 0 period %0d", t1 - t0));
    wr(T0, 0); wr(T1, 0); wr(T0 + 12, 1); wr(T1 + 12, 1);
    check(irq == 2'b00, "timer irqs cleared");
    // GPIO keys the DDS
    rd(GP + 4, v); check(v == 32'hCAFE_0000, "GPIO in");
    check(dac == 0, "DAC silent");
    wr(GP, 32'h1);
    maxabs = 0;
    repeat (200) begin @(negedge clk); if ((dac < 0 ? -dac : dac) > maxabs) maxabs = dac < 0 ? -dac : dac; end
    check(carrier == 1'b1 && maxabs > 8000, $sformatf("carrier amplitude %0d", maxabs));
    wr(GP, 32'h0);
    @(negedge clk);
    check(carrier == 1'b0 && dac == 0, "carrier off");
    // FTW
    rd(ASK + 8, v); check(v == FTW_10M7, "default tuning word");
    wr(ASK + 8, 32'h1234_5678); rd(ASK + 8, v); check(v == 32'h1234_5678, "tuning word");
    wr(ASK + 8, FTW_10M7);
    // unmapped
    rd(32'h2000_0000, v); check(v == 0, "unmapped reads 0");
    // I2C read of the sensor
    i2c(I2C_START, 8'h90); i2c(I2C_WRITE, 8'hAA);
    i2c(I2C_START, 8'h91); i2c(I2C_READ, 8'h00); rd(IIC + 8, v);
    check(v[7:0] == 8'h1A, $sformatf("temperature MSB %h", v[7:0]));
    i2c(I2C_READ, 8'h00, 1); rd(IIC + 8, v);
    check(v[7:0] == 8'h80, $sformatf("temperature LSB %h", v[7:0]));
    i2c(I2C_STOP, 8'h00);
    check(last_cmd == 8'hAA, "sensor command");
    // one encoded frame, payload 0x1A
    exp = SYNC;
    for (int i = 7; i >= 0; i--) exp = {exp, (8'h1A >> i) & 1 ? ONE : ZERO};
    @(negedge clk); req = '{valid: 1'b1, we: 1'b1, addr: ASK, wdata: 32'h1A, be: 4'hF};
    @(negedge clk); req = '0;
    rd(ASK, v); check(v[0] == 1'b1, "encoder busy");
    repeat (SUBBIT / 2 - 3) @(negedge clk);
    for (int k = 0; k < exp.len(); k++) begin
      check(carrier == (exp[k] == "1"), $sformatf("sub-bit %0d", k));
      if (exp[k] == "0") check(dac == 0, "DAC silent while off");
      repeat (SUBBIT) @(negedge clk);
    end
    rd(ASK, v); check(v[0] == 1'b0, "encoder done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
