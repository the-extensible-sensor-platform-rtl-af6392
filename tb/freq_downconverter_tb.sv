// freq_downconverter_tb: checks the I/Q mixer.
//
// 1) Random ADC samples: each I/Q output, two clocks later, must equal the
//    sample times the local oscillator cos/sin, computed here from a
//    reference phase accumulator and real-valued cos/sin, divided by 2^13
//    (within the rounding of the oscillator table).
// 2) A 10.7 MHz tone of amplitude A at the input: the mean of I and Q over
//    1000 samples must be the baseband vector of length about A/2.
module freq_downconverter_tb;
  import esp_pkg::*;
  localparam real PI = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] adc;
  logic signed [14:0] i_o, q_o;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  freq_downconverter dut (.clk, .rst_n, .ftw(FTW_10M7), .adc_i(adc), .i_o, .q_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // ref_phase: oscillator phase used with the sample applied this clock
  logic [31:0] ref_phase;
  logic signed [13:0] hist [2];
  logic [31:0] ph_hist [2];
  real ei, eq, si, sq, mag;

  initial begin
    adc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // the oscillator output on a clock is the table value of the phase one
    // clock earlier; the sample register lines up with it
    ref_phase = 32'd0;
    for (int n = 0; n < 2000; n++) begin
      adc = 14'($urandom);
      @(posedge clk);
      hist[1] = hist[0]; hist[0] = adc;
      ph_hist[1] = ph_hist[0]; ph_hist[0] = ref_phase;
      ref_phase += FTW_10M7;
      @(negedge clk);
      if (n >= 2) begin
        ei = real'(hist[1]) * 8191.0 * $cos(2.0 * PI * real'(ph_hist[1][31:22]) / 1024.0) / 8192.0;
        eq = real'(hist[1]) * 8191.0 * $sin(2.0 * PI * real'(ph_hist[1][31:22]) / 1024.0) / 8192.0;
        check(real'(i_o) - ei < 2.5 && ei - real'(i_o) < 2.5, $sformatf("I n=%0d %0d vs %f", n, i_o, ei));
        check(real'(q_o) - eq < 2.5 && eq - real'(q_o) < 2.5, $sformatf("Q n=%0d %0d vs %f", n, q_o, eq));
      end
    end
    // tone at the IF, arbitrary phase
    si = 0; sq = 0;
    for (int n = 0; n < 1100; n++) begin
      adc = 14'($rtoi(6000.0 * $cos(2.0 * PI * 10.7 / 25.0 * n + 0.7)));
      @(negedge clk);
      if (n >= 100) begin si += real'(i_o); sq += real'(q_o); end
    end
    mag = $sqrt(si * si + sq * sq) / 1000.0;
    check(mag > 2900.0 && mag < 3100.0, $sformatf("baseband magnitude %f, expected ~3000", mag));
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
