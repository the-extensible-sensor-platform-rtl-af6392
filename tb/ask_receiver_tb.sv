// ask_receiver_tb: checks the ASK data receiver chain on a keyed IF tone.
//
// The testbench synthesizes ADC samples of a 10.7 MHz carrier (real-valued
// cosine, 25 MHz sampling, random phase, a 2 kHz frequency offset, +-60 LSB
// noise) keyed on and off in random lengths of 300..1200 us. It checks:
// the carrier output is 1 from 60 us after every on-edge to the off-edge,
// 0 from 60 us after every off-edge to the next on-edge; the on/off
// detection delay; the steady-state energy, which for amplitude A must lie
// between 25*A and 36*A (I and Q each sum 50 samples of A/2 times the
// carrier phase); the energy with no carrier stays near zero; energy is
// updated every 50 clocks.
module ask_receiver_tb;
  import esp_pkg::*;
  localparam real PI = 3.141592653589793;
  localparam real A  = 4000.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] adc;
  logic [21:0] energy;
  logic ev, carrier;
  logic on;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  ask_receiver dut (.clk, .rst_n, .ftw(FTW_10M7), .adc_i(adc), .threshold(22'd50000),
                    .energy, .energy_valid(ev), .carrier);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // sample generator
  longint n = 0;
  real ph0;
  always @(negedge clk) begin
    n++;
    adc <= 14'($rtoi((on ? A * $cos(2.0 * PI * (10.702 / 25.0) * real'(n) + ph0) : 0.0)
                     + real'(int'($urandom_range(0, 120)) - 60)));
  end

  // energy update spacing
  int cyc = 0, last_ev = -1, bad_spacing = 0;
  always @(posedge clk) begin
    cyc++;
    if (ev) begin
      if (last_ev >= 0 && cyc - last_ev != DECIM) bad_spacing++;
      last_ev = cyc;
    end
  end

  int len, since, rise_delay, max_rise = 0, max_fall = 0;
  logic seen;
  initial begin
    on = 0; ph0 = 1.3; adc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2000) @(negedge clk);
    for (int seg = 0; seg < 24; seg++) begin
      on = seg % 2 == 0;
      if (seg % 4 == 0) ph0 = real'($urandom_range(0, 628)) / 100.0;
      len = 25 * $urandom_range(300, 1200);     // clocks
      seen = 0;
      for (since = 0; since < len; since++) begin
        @(negedge clk);
        if (!seen && carrier == on) begin
          seen = 1;
          if (on && since > max_rise) max_rise = since;
          if (!on && since > max_fall) max_fall = since;
        end
        if (since >= 1500) check(carrier == on, $sformatf("seg %0d at %0d clocks: carrier %0d", seg, since, carrier));
        if (since == len - 10) begin
          if (on) check(real'(energy) > 25.0 * A && real'(energy) < 36.0 * A,
                        $sformatf("on energy %0d", energy));
          else    check(energy < 22'd5000, $sformatf("off energy %0d", energy));
        end
      end
    end
    check(max_rise > 0 && max_rise <= 1500, $sformatf("on detected within %0d clocks", max_rise));
    check(max_fall > 0 && max_fall <= 1500, $sformatf("off detected within %0d clocks", max_fall));
    check(bad_spacing == 0, "energy every 50 clocks");
    $display("detection delay: on %0d, off %0d clocks", max_rise, max_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
