// gpio_tb: checks the GPIO register: outputs written and read back,
// other offsets ignored, and inputs seen through the two-flop synchronizer
// two clocks after they change.
module gpio_tb;
  import esp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  reg_req_t req;
  logic [31:0] rdata, v, go, gi;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  gpio dut (.clk, .rst_n, .req, .rdata, .gpio_o(go), .gpio_i(gi));

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

  logic [31:0] x;
  initial begin
    req = '0; gi = '0;
    repeat (2) @(negedge clk);
    check(go == 0, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      x = $urandom;
      wr(4'd0, x);
      check(go == x, "output bits");
      rd(4'd0, v); check(v == x, "OUT readback");
      wr(4'd5, ~x);
      check(go == x, "other offset ignored");
      @(negedge clk); gi = ~x;
      @(negedge clk);
      rd(4'd1, v); check(v == ~x, "IN after two clocks");
    end
    @(negedge clk); gi = 32'h1234_5678;
    @(negedge clk); req = '{sel: 1'b1, we: 1'b0, addr: 4'd1, wdata: '0};
    #1 check(rdata != 32'h1234_5678, "not visible after one clock");
    @(negedge clk); #1 check(rdata == 32'h1234_5678, "visible after two clocks");
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
