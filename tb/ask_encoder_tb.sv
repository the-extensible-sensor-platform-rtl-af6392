// ask_encoder_tb: checks the carrier on/off frames of the ASK encoder.
//
// Uses a short sub-bit (SUBBIT = 20 clocks) to keep the run short. The
// expected frame is written out here as text from the sync and bit
// encoding tables ("1" = carrier on) and compared with the carrier in the
// middle of every sub-bit. Also checks that the carrier is constant within
// each sub-bit, that busy lasts exactly (13 + 6*8) * SUBBIT clocks, that a
// start while busy is ignored, and that the carrier is off between frames.
module ask_encoder_tb;
  localparam int SUBBIT = 20;
  localparam int NB = 8;
  localparam string SYNC = "1011001011001";
  localparam string ZERO = "011011";
  localparam string ONE  = "001001";

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, carrier;
  logic [NB-1:0] data;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  ask_encoder #(.DATA_BITS(NB), .SUBBIT(SUBBIT)) dut (
    .clk, .rst_n, .start, .data, .busy, .carrier_on(carrier));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic send_and_check(input logic [NB-1:0] d);
    string exp;
    int busy_cycles;
    logic first;
    exp = SYNC;
    for (int i = NB - 1; i >= 0; i--) exp = {exp, d[i] ? ONE : ZERO};
    @(negedge clk); data = d; start = 1'b1;
    @(negedge clk); start = 1'b0; data = ~d;
    busy_cycles = 1;
    for (int k = 0; k < exp.len(); k++) begin
      for (int t = 0; t < SUBBIT; t++) begin
        if (t == 0) first = carrier;
        else check(carrier == first, "carrier steady within sub-bit");
        if (t == SUBBIT / 2)
          check(carrier == (exp[k] == "1"), $sformatf("d=%h sub-bit %0d", d, k));
        if (k == 5 && t == 3) begin start = 1'b1; end   // ignored while busy
        if (k == 5 && t == 4) begin start = 1'b0; end
        @(negedge clk);
        if (busy) busy_cycles++;
      end
    end
    check(busy == 1'b0 && carrier == 1'b0, "idle after frame");
    check(busy_cycles == (13 + 6 * NB) * SUBBIT, $sformatf("busy %0d clocks", busy_cycles));
    repeat (30) begin @(negedge clk); check(carrier == 1'b0 && !busy, "off between frames"); end
  endtask

  initial begin
    data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(carrier == 1'b0 && busy == 1'b0, "idle after reset");
    send_and_check(8'hA5);
    send_and_check(8'h00);
    send_and_check(8'hFF);
    send_and_check(8'h3C);
    send_and_check(8'h1A);
    send_and_check(8'h80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
