// binary_decision_tb: checks the threshold decision: 1 only when the energy
// is strictly above the threshold, updated one clock after valid, held
// otherwise; includes the equal and off-by-one cases.
module binary_decision_tb;
  logic clk = 1'b0, rst_n = 1'b0, vi, b;
  logic [21:0] e, th;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  binary_decision dut (.clk, .rst_n, .valid_i(vi), .energy_i(e), .threshold(th), .bit_o(b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic expb;
  initial begin
    vi = 0; e = 0; th = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(b == 1'b0, "reset");
    for (int n = 0; n < 600; n++) begin
      th = 22'($urandom);
      unique case (n % 4)
        0: e = th;
        1: e = th + 22'd1;
        2: e = th - 22'd1;
        default: e = 22'($urandom);
      endcase
      if (th == 22'h3FFFFF && n % 4 == 1) e = th;
      expb = e > th;
      vi = 1;
      @(negedge clk);
      check(b == expb, $sformatf("e=%0d th=%0d b=%0d", e, th, b));
      vi = 0; e = ~e;
      @(negedge clk);
      check(b == expb, "held without valid");
    end
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
