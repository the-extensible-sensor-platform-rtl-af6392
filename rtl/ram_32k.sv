// ram_32k: 32 KiB instruction and data memory of the processor subsystem.
//
// 8192 words of 32 bits with two synchronous ports: a read-only instruction
// port (iaddr -> idata) and a read/write data port with byte enables. Both
// return read data one clock after the address; a write updates the enabled
// bytes at the clock edge (read-before-write on the data port). Addresses
// are byte addresses; the two low bits are ignored. The dual-port shape is
// this design's choice for "32K RAM, instruction and data"; the size is
// read as 32 KiB.
module ram_32k #(
  parameter int unsigned BYTES = 32768
) (
  input  logic        clk,
  // instruction port
  input  logic [31:0] iaddr,
  output logic [31:0] idata,
  // data port
  input  logic        den,
  input  logic        dwe,
  input  logic [3:0]  dbe,
  input  logic [31:0] daddr,
  input  logic [31:0] dwdata,
  output logic [31:0] drdata
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  logic [AW-1:0] ia, da;
  assign ia = iaddr[AW+1:2];
  assign da = daddr[AW+1:2];

  always_ff @(posedge clk) idata <= mem[ia];

  always_ff @(posedge clk) begin
    if (den) begin
      drdata <= mem[da];
      if (dwe)
        for (int b = 0; b < 4; b++)
          if (dbe[b]) mem[da][8*b +: 8] <= dwdata[8*b +: 8];
    end
  end
endmodule
