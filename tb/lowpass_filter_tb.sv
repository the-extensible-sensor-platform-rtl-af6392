// lowpass_filter_tb: checks the first-order low pass filter.
//
// A real-valued model y += (x - y) / 8 runs beside it on random steps and
// noise; the filter must stay within a few LSB of truncation error of the
// model. Also checks the step response: a step from 0 to 200000 reaches
// 63% after 8 samples (one time constant, within one sample) and settles
// within 0.1% after 80, and the output does not change without valid.
module lowpass_filter_tb;
  logic clk = 1'b0, rst_n = 1'b0, vi, vo;
  logic [21:0] x, y;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  lowpass_filter dut (.clk, .rst_n, .valid_i(vi), .x_i(x), .valid_o(vo), .y_o(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  real m;
  int n63;
  initial begin
    vi = 0; x = 0; m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // step response
    n63 = -1;
    for (int n = 1; n <= 80; n++) begin
      x = 22'd200000; vi = 1;
      @(negedge clk); vi = 0;
      check(vo, "valid follows");
      if (n63 < 0 && y >= 22'd126424) n63 = n;
      @(negedge clk);
    end
    check(n63 >= 7 && n63 <= 9, $sformatf("63%% after %0d samples", n63));
    check(y > 22'd199800 && y <= 22'd200000, $sformatf("settled %0d", y));
    // against the model
    m = real'(y);
    for (int n = 0; n < 2000; n++) begin
      x = (n / 100) % 2 ? 22'(150000 + $urandom_range(0, 20000)) : 22'($urandom_range(0, 8000));
      vi = 1;
      m = m + (real'(x) - m) / 8.0;
      @(negedge clk);
      vi = 0;
      check(real'(y) - m < 10.0 && m - real'(y) < 10.0, $sformatf("y %0d model %f", y, m));
      x = 22'($urandom);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
