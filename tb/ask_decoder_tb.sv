// ask_decoder_tb: checks sync detection and bit decoding.
//
// A carrier on/off stream is generated here from the sync and bit encoding
// tables (as text), with SUBBIT = 40 clocks and every edge moved by a random
// amount of up to a quarter sub-bit to stand in for receiver filter delay.
// Checks decoded payloads, the frame_valid pulse, a frame with a corrupted
// data group (bit_err), a corrupted sync (sync_fail, no frame), and that a
// good frame after those is still received.
module ask_decoder_tb;
  localparam int SUBBIT = 40;
  localparam int NB = 8;
  localparam string SYNC = "1011001011001";
  localparam string ZERO = "011011";
  localparam string ONE  = "001001";

  logic clk = 1'b0, rst_n = 1'b0, carrier = 1'b0;
  logic [NB-1:0] data;
  logic fv, berr, sfail;
  int checks = 0, failures = 0, frames = 0, fails = 0;
  logic [NB-1:0] last;
  logic last_err;

  always #20 clk = ~clk;

  ask_decoder #(.DATA_BITS(NB), .SUBBIT(SUBBIT)) dut (
    .clk, .rst_n, .carrier, .data, .frame_valid(fv), .bit_err(berr), .sync_fail(sfail));

  always @(posedge clk) begin
    if (fv) begin frames++; last = data; last_err = berr; end
    if (sfail) fails++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // plays a pattern string; each sub-bit boundary moves by up to SUBBIT/4
  task automatic play(input string p);
    int elapsed = 0, stop;
    for (int k = 0; k < p.len(); k++) begin
      stop = (k + 1) * SUBBIT + int'($urandom_range(0, SUBBIT / 2)) - SUBBIT / 4;
      carrier = (p[k] == "1");
      while (elapsed < stop) begin @(negedge clk); elapsed++; end
    end
    carrier = 1'b0;
    repeat (3 * SUBBIT) @(negedge clk);
  endtask

  function automatic string frame(input logic [NB-1:0] d, input int bad_group);
    string s = SYNC;
    for (int i = NB - 1; i >= 0; i--)
      s = {s, (NB - 1 - i == bad_group) ? "111111" : (d[i] ? ONE : ZERO)};
    return s;
  endfunction

  logic [NB-1:0] d;
  int f0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    for (int n = 0; n < 12; n++) begin
      d = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      f0 = frames;
      play(frame(d, -1));
      check(frames == f0 + 1, "one frame");
      check(last == d, $sformatf("payload %h got %h", d, last));
      check(last_err == 1'b0, "no bit error");
    end
    f0 = frames;
    play(frame(8'h5A, 3));
    check(frames == f0 + 1 && last_err == 1'b1, "bad group flagged");
    f0 = frames;
    play({"1011001011011", ZERO, ONE, ZERO, ONE, ZERO, ONE, ZERO, ONE});
    check(frames == f0, "no frame after bad sync");
    check(fails >= 1, "sync failure reported");
    f0 = frames;
    play(frame(8'hC3, -1));
    check(frames == f0 + 1 && last == 8'hC3, "recovers after bad sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
