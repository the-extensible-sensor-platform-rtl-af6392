// decimator_tb: checks decimation by 50: outputs come exactly every 50
// clocks and each equals the sum of the 50 random I (and Q) samples that
// the testbench applied since the previous output.
module decimator_tb;
  localparam int R = 50;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [14:0] ii, qi;
  logic signed [20:0] io, qo;
  logic v;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  decimator dut (.clk, .rst_n, .i_i(ii), .q_i(qi), .i_o(io), .q_o(qo), .valid_o(v));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  longint si, sq, exp_i[$], exp_q[$];
  int cyc = 0, last_v = -1, nout = 0;

  initial begin
    ii = '0; qi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    si = 0; sq = 0;
    for (int n = 0; n < 20 * R; n++) begin
      ii = 15'($urandom); qi = 15'($urandom);
      if (n % 7 == 0) begin ii = 15'h3FFF; qi = 15'h4000; end   // extremes
      si += ii; sq += qi;
      if (n % R == R - 1) begin exp_i.push_back(si); exp_q.push_back(sq); si = 0; sq = 0; end
      @(negedge clk);
      cyc++;
      if (v) begin
        if (last_v >= 0) check(cyc - last_v == R, $sformatf("spacing %0d", cyc - last_v));
        last_v = cyc;
        check(exp_i.size() > 0, "output expected");
        if (exp_i.size() > 0) begin
          check(longint'(io) == exp_i.pop_front(), "I sum");
          check(longint'(qo) == exp_q.pop_front(), "Q sum");
        end
        nout++;
      end
    end
    check(nout >= 19, $sformatf("%0d outputs", nout));
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
