// i2c_master_tb: checks the I2C master against a temperature sensor model.
//
// Sequence: START to the sensor's write address, WRITE the read-temperature
// command 0xAA, repeated START to the read address, READ two bytes (ACK then
// NACK), STOP. Checks the ACKs, the command the sensor received, both
// temperature bytes, the busy flag, and that SCL runs at no more than
// 100 kHz (period measured between rising edges). Then addresses a missing
// device and checks that the NACK is reported.
module i2c_master_tb;
  import esp_pkg::*;
  localparam logic [15:0] TEMP = 16'h1980;

  logic clk = 1'b0, rst_n = 1'b0;
  reg_req_t req;
  logic [31:0] rdata;
  logic scl_oe, sda_oe, s_oe, scl, sda;
  logic [7:0] last_cmd;
  int cmds, reads, checks = 0, failures = 0;

  always #20 clk = ~clk;   // 25 MHz

  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | s_oe);

  i2c_master dut (.clk, .rst_n, .req, .rdata, .scl_oe, .sda_oe, .sda_i(sda));
  ds1721_model #(.ADDR(7'h48)) sensor (
    .temp(TEMP), .scl, .sda, .sda_oe(s_oe), .last_cmd, .cmds, .reads);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); req = '{sel: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk); req = '0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); req = '{sel: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1 d = rdata;
    @(negedge clk); req = '0;
  endtask

  task automatic cmd(input i2c_cmd_e c, input logic [7:0] tx, input bit nack);
    logic [31:0] st;
    wr(4'd1, {24'd0, tx});
    wr(4'd0, {23'd0, nack, 5'd0, c});
    rd(4'd3, st);
    check(st[0] == 1'b1, "busy after command");
    do rd(4'd3, st); while (st[0]);
  endtask

  // SCL period measurement
  realtime last_rise = 0, min_period = 1e9;
  always @(posedge scl) begin
    if (last_rise > 0 && $realtime - last_rise < min_period) min_period = $realtime - last_rise;
    last_rise = $realtime;
  end

  logic [31:0] v;
  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cmd(I2C_START, {7'h48, 1'b0}, 1'b0);
    rd(4'd3, v); check(v[1] == 1'b0, "address ACKed");
    cmd(I2C_WRITE, 8'hAA, 1'b0);
    rd(4'd3, v); check(v[1] == 1'b0, "command ACKed");
    check(last_cmd == 8'hAA && cmds == 1, "sensor received 0xAA");
    cmd(I2C_START, {7'h48, 1'b1}, 1'b0);
    rd(4'd3, v); check(v[1] == 1'b0, "read address ACKed");
    cmd(I2C_READ, 8'h00, 1'b0);
    rd(4'd2, v); check(v[7:0] == TEMP[15:8], $sformatf("MSB %h", v[7:0]));
    cmd(I2C_READ, 8'h00, 1'b1);
    rd(4'd2, v); check(v[7:0] == TEMP[7:0], $sformatf("LSB %h", v[7:0]));
    check(reads == 2, "two bytes sent");
    cmd(I2C_STOP, 8'h00, 1'b0);
    rd(4'd3, v); check(v[2] == 1'b0, "bus released after STOP");
    check(scl == 1'b1 && sda == 1'b1, "lines idle high");
    check(min_period >= 10_000.0, $sformatf("SCL period %0t >= 10 us", min_period));
    check(min_period <= 10_200.0, $sformatf("SCL period %0t close to 10 us", min_period));
    // a device that is not there
    cmd(I2C_START, {7'h21, 1'b0}, 1'b0);
    rd(4'd3, v); check(v[1] == 1'b1, "missing device NACKs");
    cmd(I2C_STOP, 8'h00, 1'b0);
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
