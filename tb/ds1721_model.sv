// ds1721_model: behavioural model of an I2C temperature sensor slave
// (simulation only, not synthesizable).
//
// It answers at a 7-bit address, acknowledges every byte written to it and
// remembers the last byte written as its command. When read it returns the
// two temperature bytes of `temp`, most significant first, and repeats them while the
// master keeps acknowledging. It watches the wired-AND bus lines `scl` and
// `sda` and pulls SDA low through `sda_oe`; it changes SDA only while SCL is
// low. `cmds` counts command bytes, `reads` counts bytes it sent.
module ds1721_model #(
  parameter logic [6:0]  ADDR = 7'b1001000
) (
  input  logic [15:0] temp,     // reading returned, MSB = whole degrees C
  input  logic scl,
  input  logic sda,
  output logic sda_oe,
  output logic [7:0] last_cmd,
  output int   cmds,
  output int   reads
);
  typedef enum {M_IDLE, M_ADDR, M_WR, M_RD} mstate_e;
  mstate_e    st;
  int         bitn;
  logic [7:0] sh, rd_sh;
  logic       rd_dir, master_ack, byte_sel;

  initial begin
    st = M_IDLE; sda_oe = 1'b0; bitn = 0; cmds = 0; reads = 0;
    last_cmd = '0; sh = '0; rd_sh = '0; rd_dir = 1'b0; master_ack = 1'b0;
    byte_sel = 1'b0;
  end

  always @(negedge sda) if (scl) begin st = M_ADDR; bitn = 0; sda_oe = 1'b0; end
  always @(posedge sda) if (scl) begin st = M_IDLE; sda_oe = 1'b0; end

  // bitn counts SCL rising edges since the start condition or the last
  // acknowledge: 1..8 are data bits, 9 is the acknowledge bit
  always @(posedge scl) begin
    if (st != M_IDLE) begin
      bitn++;
      if (bitn <= 8) sh = {sh[6:0], sda};
      else if (st == M_RD) master_ack = ~sda;
    end
  end

  always @(negedge scl) begin
    if (st != M_IDLE) begin
      if (bitn == 8) begin
        unique case (st)
          M_ADDR: if (sh[7:1] == ADDR) begin sda_oe = 1'b1; rd_dir = sh[0]; end
                  else begin st = M_IDLE; sda_oe = 1'b0; end
          M_WR:   begin last_cmd = sh; cmds++; sda_oe = 1'b1; end
          M_RD:   begin sda_oe = 1'b0; reads++; end
          default: ;
        endcase
      end else if (bitn == 9) begin
        bitn = 0;
        if (st == M_ADDR) begin
          st = rd_dir ? M_RD : M_WR;
          byte_sel = 1'b0;
        end else if (st == M_RD && !master_ack) begin
          st = M_IDLE;
        end
        if (st == M_RD) begin
          rd_sh    = byte_sel ? temp[7:0] : temp[15:8];
          byte_sel = ~byte_sel;
          sda_oe   = ~rd_sh[7];
        end else begin
          sda_oe = 1'b0;
        end
      end else if (st == M_RD && bitn >= 1) begin
        sda_oe = ~rd_sh[7 - bitn];
      end
    end
  end
endmodule
