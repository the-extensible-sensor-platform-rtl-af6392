// envelope_detector_tb: checks |I| + |Q| on random and extreme inputs, the
// one-clock latency, and that the output holds when valid is low.
module envelope_detector_tb;
  logic clk = 1'b0, rst_n = 1'b0, vi, vo;
  logic signed [20:0] ii, qi;
  logic [21:0] env;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  envelope_detector dut (.clk, .rst_n, .valid_i(vi), .i_i(ii), .q_i(qi), .valid_o(vo), .env_o(env));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  longint e, held;
  initial begin
    vi = 0; ii = 0; qi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      ii = 21'($urandom); qi = 21'($urandom);
      if (n == 0) begin ii = -21'sd1048575; qi = -21'sd1048575; end
      if (n == 1) begin ii = 21'sd1048575; qi = -21'sd5; end
      vi = 1;
      e = (ii < 0 ? -longint'(ii) : longint'(ii)) + (qi < 0 ? -longint'(qi) : longint'(qi));
      @(negedge clk);
      check(vo == 1'b1, "valid follows");
      check(longint'(env) == e, $sformatf("env %0d vs %0d", env, e));
      held = env;
      vi = 0; ii = 21'($urandom); qi = 21'($urandom);
      @(negedge clk);
      check(vo == 1'b0 && longint'(env) == held, "holds without valid");
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
