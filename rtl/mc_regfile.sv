// mc_regfile -- general-purpose register file.
//
// Two combinational read ports (addresses Aa/Ab, data Da/Db) feed the A and B
// registers in the Decode cycle; one synchronous write port (Aw, Dw, WrEn) is
// used by R-type writeback (Reg[Rd] = ALUOut) and load writeback
// (Reg[Rt] = MDR).
//
// Own choices, following MIPS: 32 registers of 32 bits, register 0 always
// reads as zero and ignores writes, and all registers clear on reset
// (synchronous, active-low rst_n).  A write becomes visible on the read ports
// after the clock edge; the FSM never reads and writes in the same cycle.
module mc_regfile
  import mc_pkg::*;
#(
  parameter int NREGS = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   aa,     // read address a (Rs)
  input  logic [AW-1:0]   ab,     // read address b (Rt)
  output logic [XLEN-1:0] da,
  output logic [XLEN-1:0] db,
  input  logic            we,     // WrEn
  input  logic [AW-1:0]   aw,     // write address (Rt or Rd)
  input  logic [XLEN-1:0] dw
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && aw != '0) begin
      regs[aw] <= dw;
    end
  end

  assign da = (aa == '0) ? '0 : regs[aa];
  assign db = (ab == '0) ? '0 : regs[ab];

endmodule
