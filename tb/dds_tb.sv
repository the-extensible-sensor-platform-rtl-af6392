// dds_tb: checks the DDS carrier generator.
//
// A reference phase accumulator in the testbench predicts every sine and
// cosine sample from the real-valued sin/cos of the table phase (allowing
// one LSB of rounding). It checks that the output is zero while disabled,
// that keying keeps the phase running, and, from zero crossings over 4000
// samples, that the default tuning word gives 10.7 MHz at a 25 MHz clock.
module dds_tb;
  import esp_pkg::*;
  localparam real PI = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [31:0] ftw = FTW_10M7;
  logic signed [13:0] s, c;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  dds dut (.clk, .rst_n, .en, .ftw, .sin_o(s), .cos_o(c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [31:0] ref_phase;   // phase of the sample now on the outputs
  real es, ec;
  int crossings;
  logic signed [13:0] prev_s;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);  // first output: phase 0
    ref_phase = 32'd0;
    // disabled: zero output
    repeat (20) begin
      check(s == 0 && c == 0, "zero while disabled");
      @(negedge clk); ref_phase += ftw;
    end
    en = 1'b1;
    @(negedge clk); ref_phase += ftw;
    crossings = 0; prev_s = s;
    for (int n = 0; n < 4000; n++) begin
      es = 8191.0 * $sin(2.0 * PI * real'(ref_phase[31:22]) / 1024.0);
      ec = 8191.0 * $cos(2.0 * PI * real'(ref_phase[31:22]) / 1024.0);
      check(real'(s) - es < 1.0 && es - real'(s) < 1.0, $sformatf("sin n=%0d %0d vs %f", n, s, es));
      check(real'(c) - ec < 1.0 && ec - real'(c) < 1.0, $sformatf("cos n=%0d %0d vs %f", n, c, ec));
      if (prev_s < 0 && s >= 0) crossings++;
      prev_s = s;
      @(negedge clk); ref_phase += ftw;
    end
    // 4000 samples at 25 MHz = 160 us; 10.7 MHz gives 1712 cycles
    check(crossings >= 1711 && crossings <= 1713, $sformatf("crossings %0d", crossings));
    en = 1'b0;
    @(negedge clk);
    check(s == 0, "off again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
