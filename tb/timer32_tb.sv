// timer32_tb: checks the 32-bit timer.
//
// Auto-reload mode: measures the clocks between expirations (LOAD+1),
// checks the sticky status flag, its write-1-to-clear, and the interrupt
// gating. One-shot mode: checks that the timer expires once after LOAD+1
// clocks and then stops with enable cleared. Also reads back the registers.
module timer32_tb;
  import esp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  reg_req_t req;
  logic [31:0] rdata, v;
  logic irq;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  timer32 dut (.clk, .rst_n, .req, .rdata, .irq);

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

  int t0, t1, t2, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wr(4'd1, 32'd99);
    rd(4'd1, v); check(v == 99, "LOAD readback");
    rd(4'd2, v); check(v == 99, "COUNT loaded");
    check(irq == 1'b0, "no irq before start");
    wr(4'd0, 32'b111);                 // enable, reload, irq enable
    @(posedge irq); t0 = cyc;
    wr(4'd3, 32'd1);                   // clear
    check(irq == 1'b0, "irq cleared");
    @(posedge irq); t1 = cyc;
    wr(4'd3, 32'd1);
    @(posedge irq); t2 = cyc;
    check(t1 - t0 == 100, $sformatf("period %0d", t1 - t0));
    check(t2 - t1 == 100, $sformatf("period %0d", t2 - t1));
    wr(4'd0, 32'b011);                 // irq disabled, flag stays
    rd(4'd3, v); check(v[0] == 1'b1, "flag set");
    check(irq == 1'b0, "irq masked");
    // one-shot
    wr(4'd0, 32'b000);
    wr(4'd3, 32'd1);
    wr(4'd1, 32'd9);
    wr(4'd0, 32'b101);
    t0 = cyc;
    @(posedge irq); t1 = cyc;
    check(t1 - t0 == 10 || t1 - t0 == 11, $sformatf("one-shot delay %0d", t1 - t0));
    rd(4'd0, v); check(v[0] == 1'b0, "one-shot stops");
    rd(4'd2, v); check(v == 0, "count at zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
