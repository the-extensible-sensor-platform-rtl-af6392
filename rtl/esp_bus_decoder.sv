// esp_bus_decoder: processor data bus to RAM and peripheral registers.
//
// Splits one processor data bus between the 32 KiB RAM (byte addresses
// 0x0000_0000..0x0000_7FFF) and up to 16 peripherals of 16 word registers
// each (0x4000_0000 + 0x100 * index + 4 * register). A request is a
// one-clock `valid`; the response `ready` pulses one clock later with the
// read data (RAM data from its registered port, peripheral data sampled at
// the request). Accesses elsewhere complete with read data 0 and no effect.
// The address map and this single-cycle protocol are this design's own; the
// prototype used the vendor processor's buses.
module esp_bus_decoder
  import esp_pkg::*;
#(
  parameter int unsigned NPERIPH = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    bus_req,
  output bus_rsp_t    bus_rsp,
  // RAM data port
  output logic        ram_en,
  output logic        ram_we,
  output logic [3:0]  ram_be,
  output logic [31:0] ram_addr,
  output logic [31:0] ram_wdata,
  input  logic [31:0] ram_rdata,
  // peripherals
  output reg_req_t    preq   [NPERIPH],
  input  logic [31:0] prdata [NPERIPH]
);
  logic        is_ram, is_per, was_ram;
  logic [3:0]  pidx;
  logic [31:0] per_q;

  assign is_ram = bus_req.addr[31:15] == '0;
  assign is_per = bus_req.addr[31:12] == 20'h40000;
  assign pidx   = bus_req.addr[11:8];

  assign ram_en    = bus_req.valid && is_ram;
  assign ram_we    = bus_req.we;
  assign ram_be    = bus_req.be;
  assign ram_addr  = bus_req.addr;
  assign ram_wdata = bus_req.wdata;

  always_comb begin
    for (int p = 0; p < NPERIPH; p++) begin
      preq[p].sel   = bus_req.valid && is_per && (pidx == 4'(p));
      preq[p].we    = bus_req.we;
      preq[p].addr  = bus_req.addr[5:2];
      preq[p].wdata = bus_req.wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rsp.ready <= 1'b0;
      was_ram       <= 1'b0;
      per_q         <= '0;
    end else begin
      bus_rsp.ready <= bus_req.valid;
      was_ram       <= is_ram;
      per_q         <= '0;
      for (int p = 0; p < NPERIPH; p++)
        if (is_per && pidx == 4'(p)) per_q <= prdata[p];
    end
  end

  assign bus_rsp.rdata = was_ram ? ram_rdata : per_q;

  // every request is answered on the next clock
  a_ready_follows_valid: assert property (
    @(posedge clk) disable iff (!rst_n) bus_req.valid |=> bus_rsp.ready);
endmodule
