// mc_datapath -- registers, register file, ALU and multiplexers of the
// multicycle processor (everything but the memory and the control FSM).
//
// Registers: PC (PC_WE), IR (IR_WE), and MDR, A, B, ALUOut, which load every
// cycle; the control FSM only reads each of them in the cycle after it was
// loaded.  IR fields: Rs = IR[25:21], Rt = IR[20:16], Rd = IR[15:11],
// imm16 = IR[15:0].
// Multiplexers (select -> inputs):
//   MemIn   memory address          PC | ALUOut
//   Dst     register write address  Rt | Rd
//   RegIn   register write data     MDR | ALUOut
//   ALUSrcA ALU input a             PC | A
//   ALUSrcB ALU input b             B | 4 | SE(imm16) | SE(imm16) << 2
//   PCSrc   next PC                 ALU | ALUOut | exception handler
// The third PCSrc input and the EPC/Cause registers (mc_exc_regs) are the
// exception extension; EPC takes the PC register's value.
// Memory write data is B.
//
// Interface: ctrl comes from mc_control; opcode/funct/zero/ovf go back to it.
// The memory sits outside: mem_addr/mem_wdata/mem_we out, mem_rdata in
// (combinational read).  Synchronous active-low reset; PC resets to RESET_PC,
// an own choice (the design does not give a reset address).
module mc_datapath
  import mc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = 32'h0000_0400
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_t           ctrl,
  output logic [5:0]      opcode,
  output logic [5:0]      funct,
  output logic            zero,
  output logic            ovf,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  output logic            mem_we,
  input  logic [XLEN-1:0] mem_rdata,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] epc,
  output logic [XLEN-1:0] cause
);

  logic [XLEN-1:0] ir, mdr, a_q, b_q, aluout;
  logic [XLEN-1:0] pc_next, rf_da, rf_db, rf_dw;
  logic [XLEN-1:0] se, se_shl2, alu_a, alu_b, alu_y, exc_vector;
  logic [4:0]      rs, rt, rd, rf_aw;

  // Instruction fields
  assign opcode = ir[31:26];
  assign rs     = ir[25:21];
  assign rt     = ir[20:16];
  assign rd     = ir[15:11];
  assign funct  = ir[5:0];

  // State registers
  mc_reg #(.WIDTH(XLEN), .RESET_VAL(RESET_PC)) u_pc (
    .clk, .rst_n, .en(ctrl.pc_we), .d(pc_next), .q(pc));
  mc_reg #(.WIDTH(XLEN)) u_ir (
    .clk, .rst_n, .en(ctrl.ir_we), .d(mem_rdata), .q(ir));
  mc_reg #(.WIDTH(XLEN)) u_mdr (
    .clk, .rst_n, .en(1'b1), .d(mem_rdata), .q(mdr));
  mc_reg #(.WIDTH(XLEN)) u_a (
    .clk, .rst_n, .en(1'b1), .d(rf_da), .q(a_q));
  mc_reg #(.WIDTH(XLEN)) u_b (
    .clk, .rst_n, .en(1'b1), .d(rf_db), .q(b_q));
  mc_reg #(.WIDTH(XLEN)) u_aluout (
    .clk, .rst_n, .en(1'b1), .d(alu_y), .q(aluout));

  // Register file with Dst and RegIn muxes
  assign rf_aw = (ctrl.dst == DST_RD) ? rd : rt;
  assign rf_dw = (ctrl.regin == REGIN_ALUOUT) ? aluout : mdr;

  mc_regfile #(.NREGS(32)) u_rf (
    .clk, .rst_n,
    .aa(rs), .ab(rt), .da(rf_da), .db(rf_db),
    .we(ctrl.reg_we), .aw(rf_aw), .dw(rf_dw));

  // Immediate
  mc_signext u_se (.imm16(ir[15:0]), .se, .se_shl2);

  // ALU with its source muxes
  assign alu_a = (ctrl.srca == SRCA_A) ? a_q : pc;
  always_comb begin
    unique case (ctrl.srcb)
      SRCB_B:       alu_b = b_q;
      SRCB_4:       alu_b = 32'd4;
      SRCB_SE:      alu_b = se;
      SRCB_SE_SHL2: alu_b = se_shl2;
      default:      alu_b = b_q;
    endcase
  end

  mc_alu u_alu (.a(alu_a), .b(alu_b), .fn(ctrl.alufn), .y(alu_y), .zero, .ovf);

  // Exception registers
  mc_exc_regs u_exc (
    .clk, .rst_n, .we(ctrl.exc_we), .cause_in(ctrl.cause), .pc_in(pc),
    .vector(exc_vector), .epc, .cause);

  // PCSrc
  always_comb begin
    unique case (ctrl.pcsrc)
      PCSRC_ALU:    pc_next = alu_y;
      PCSRC_ALUOUT: pc_next = aluout;
      PCSRC_EXC:    pc_next = exc_vector;
      default:      pc_next = alu_y;
    endcase
  end

  // Memory port with MemIn mux
  assign mem_addr  = (ctrl.memin == MEMIN_ALUOUT) ? aluout : pc;
  assign mem_wdata = b_q;
  assign mem_we    = ctrl.mem_we;

endmodule
