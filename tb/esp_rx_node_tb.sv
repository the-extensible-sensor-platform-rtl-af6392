// esp_rx_node_tb: checks the receiver node through its processor bus.
//
// The testbench plays the processor and the radio: it synthesizes ADC
// samples of a 10.7 MHz carrier keyed by frames built from the sync and bit
// tables (text below), with noise and a random carrier phase. It checks that
// frames are decoded into the DATA register with the STATUS flags and the
// frame interrupt, that clearing works, that GPIO IN[0] follows the
// recovered carrier, that the ENERGY register reports the filtered level,
// that a frame too weak for a raised threshold is not received, that a bad
// sync sets the sync-failure flag, the LED output, and the timer.
// SUBBIT = 3000 clocks (120 us) keeps it quick.
module esp_rx_node_tb;
  import esp_pkg::*;
  localparam int SUBBIT = 3000;
  localparam real PI = 3.141592653589793;
  localparam string SYNC = "1011001011001";
  localparam string ZERO = "011011";
  localparam string ONE  = "001001";
  localparam logic [31:0] T0 = 32'h4000_0000, GP = 32'h4000_0200, ASK = 32'h4000_0400;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  logic [31:0] idata, gpio_o, v;
  logic tirq, firq, led, carrier, scl_oe, sda_oe;
  logic signed [13:0] adc;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  esp_rx_node #(.SUBBIT(SUBBIT)) dut (
    .clk, .rst_n, .bus_req(req), .bus_rsp(rsp), .iaddr(32'd0), .idata,
    .timer_irq(tirq), .frame_irq(firq), .adc_i(adc), .scl_oe, .sda_oe,
    .sda_i(~sda_oe), .led, .gpio_o, .gpio_i(31'd0), .carrier);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d, be: 4'hF};
    @(negedge clk); req = '0;
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0, be: 4'hF};
    @(negedge clk); req = '0;
    d = rsp.rdata;
  endtask

  // radio: keyed carrier
  logic on = 1'b0;
  real amp = 3000.0, ph0 = 0.4;
  longint n = 0;
  always @(negedge clk) begin
    n++;
    adc <= 14'($rtoi((on ? amp * $cos(2.0 * PI * (10.7 / 25.0) * real'(n) + ph0) : 0.0)
                     + real'(int'($urandom_range(0, 80)) - 40)));
  end

  task automatic play(input string p);
    for (int k = 0; k < p.len(); k++) begin
      on = (p[k] == "1");
      repeat (SUBBIT) @(negedge clk);
    end
    on = 1'b0;
    repeat (3 * SUBBIT) @(negedge clk);
  endtask

  function automatic string frame(input logic [7:0] d);
    string s = SYNC;
    for (int i = 7; i >= 0; i--) s = {s, d[i] ? ONE : ZERO};
    return s;
  endfunction


  logic [7:0] d;
  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(ASK, v); check(v == 50_000, "default threshold");
    rd(ASK + 8, v); check(v == FTW_10M7, "default tuning word");
    for (int f = 0; f < 4; f++) begin
      d = (f == 0) ? 8'h19 : 8'($urandom);
      ph0 = real'($urandom_range(0, 628)) / 100.0;
      play(frame(d));
      rd(ASK + 12, v); check(v[0] == 1'b1 && v[1] == 1'b0 && firq, "frame flagged");
      rd(ASK + 16, v); check(v[7:0] == d, $sformatf("payload %h got %h", d, v[7:0]));
      wr(ASK + 12, 32'h9);
      rd(ASK + 12, v); check(v[0] == 1'b0 && !firq, "frame flag cleared");
    end
    // carrier visible on GPIO IN[0], energy register
    on = 1'b1; repeat (2000) @(negedge clk);
    rd(GP + 4, v); check(v[0] == 1'b1, "GPIO IN[0] = carrier");
    rd(ASK + 4, v); check(v > 25 * 3000 && v < 36 * 3000, $sformatf("energy %0d", v));
    rd(ASK + 12, v); check(v[2] == 1'b1, "STATUS carrier");
    on = 1'b0; repeat (2000) @(negedge clk);
    rd(GP + 4, v); check(v[0] == 1'b0, "GPIO IN[0] = no carrier");
    // raised threshold: the same frame is not received
    wr(ASK, 200_000);
    play(frame(8'hA5));
    rd(ASK + 12, v); check(v[0] == 1'b0, "weak frame ignored");
    wr(ASK, 50_000);
    // bad sync
    play({"1011001111001", frame(8'h00)});
    rd(ASK + 12, v); check(v[3] == 1'b1, "sync failure flagged");
    // LED
    wr(GP, 1); check(led == 1'b1, "LED on");
    wr(GP, 0); check(led == 1'b0, "LED off");
    // timer
    wr(T0 + 4, 32'd30); wr(T0, 32'b101);
    repeat (40) @(negedge clk);
    check(tirq == 1'b1, "timer expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
