// ram_32k_tb: checks the 32 KiB RAM: random words written over the data
// port are read back on both ports one clock later, byte enables update
// only their bytes, and the top and bottom words are distinct (full size).
module ram_32k_tb;
  logic clk = 1'b0;
  logic [31:0] iaddr, idata, daddr, dwdata, drdata;
  logic den, dwe;
  logic [3:0] dbe;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  ram_32k dut (.clk, .iaddr, .idata, .den, .dwe, .dbe, .daddr, .dwdata, .drdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clk); den = 1; dwe = 1; dbe = be; daddr = a; dwdata = d;
    @(negedge clk); den = 0; dwe = 0;
  endtask
  task automatic read(input logic [31:0] a, output logic [31:0] d, output logic [31:0] i);
    @(negedge clk); den = 1; dwe = 0; daddr = a; iaddr = a;
    @(negedge clk); den = 0; d = drdata; i = idata;
  endtask

  logic [31:0] addrs [64], vals [64], d, i;
  initial begin
    den = 0; dwe = 0; dbe = 0; daddr = 0; dwdata = 0; iaddr = 0;
    for (int k = 0; k < 64; k++) begin
      addrs[k] = {17'd0, 13'(k * 127 + 5), 2'b00};
      vals[k]  = $urandom;
      write(addrs[k], vals[k], 4'hF);
    end
    for (int k = 0; k < 64; k++) begin
      read(addrs[k], d, i);
      check(d == vals[k], "data port readback");
      check(i == vals[k], "instruction port readback");
    end
    write(32'h0000_0000, 32'h1111_1111, 4'hF);
    write(32'h0000_7FFC, 32'h2222_2222, 4'hF);
    read(32'h0000_0000, d, i); check(d == 32'h1111_1111, "bottom word");
    read(32'h0000_7FFC, d, i); check(d == 32'h2222_2222, "top word");
    write(32'h0000_0100, 32'hAABB_CCDD, 4'hF);
    write(32'h0000_0100, 32'h1122_3344, 4'b0101);
    read(32'h0000_0100, d, i); check(d == 32'hAA22_CC44, "byte enables");
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
