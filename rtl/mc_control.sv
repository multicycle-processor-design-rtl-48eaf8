// mc_control -- control FSM of the multicycle processor.
//
// Each instruction walks a path through the states:
//   IFetch -> Decode -> Branch                         (beq, 3 cycles)
//   IFetch -> Decode -> RType1 -> RType2               (add/sub, 4 cycles)
//   IFetch -> Decode -> Store1 -> Store2               (sw, 4 cycles)
//   IFetch -> Decode -> Load1 -> Load2 -> Load3        (lw, 5 cycles)
// and returns to IFetch.  Decode branches on the opcode (beq 4, R-type 0,
// sw 43, lw 35).  The control word of each state follows the design's control
// table: write enables PC_WE, Mem_WE, Reg_WE, IR_WE and the selects ALUSrcA,
// ALUSrcB, ALUOp, Dst, MemIn, RegIn, PCSrc.  In the Branch state PC_WE is the
// ALU's Zero flag; for R-type the ALU function comes from IR[5:0].
//
// Exceptions (EPC = PC, PC = handler, set Cause) are taken through one extra
// state, Exc, which then returns to IFetch:
//   - undefined instruction: Decode sees an opcode outside the four above, or
//     an R-type function code other than add/sub;
//   - overflow: RType1 sees the ALU's signed-overflow flag; the destination
//     register is then not written;
//   - I/O request: irq is sampled in the last cycle of every instruction, so
//     the interrupt is taken between instructions and EPC holds the address of
//     the next one.  irq_ack is high during that Exc cycle; the device must
//     hold irq until it sees irq_ack and then drop it.
// The Exc state, the sampling points and the irq/irq_ack handshake are own
// choices: the design names the three causes and what exception entry does,
// but not when each is detected.
//
// Interface: Moore outputs from the state register, except PC_WE in Branch
// (from zero).  Synchronous active-low reset to IFetch.
module mc_control
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] opcode,   // IR[31:26]
  input  logic [5:0] funct,    // IR[5:0]
  input  logic       zero,     // ALU Zero
  input  logic       ovf,      // ALU signed overflow
  input  logic       irq,      // I/O device request
  output logic       irq_ack,
  output ctrl_t      ctrl,
  output state_e     state
);

  state_e     state_d;
  exc_cause_e cause_q, cause_d;

  logic funct_ok;
  assign funct_ok = (funct == FN_ADD) || (funct == FN_SUB);

  // Next state
  always_comb begin
    state_d = state;
    cause_d = cause_q;
    unique case (state)
      S_IFETCH: state_d = S_DECODE;
      S_DECODE: begin
        if (opcode == OP_BEQ)                    state_d = S_BRANCH;
        else if (opcode == OP_RTYPE && funct_ok) state_d = S_RTYPE1;
        else if (opcode == OP_SW)                state_d = S_STORE1;
        else if (opcode == OP_LW)                state_d = S_LOAD1;
        else begin
          state_d = S_EXC;
          cause_d = EXC_UNDEF;
        end
      end
      S_RTYPE1: begin
        if (ovf) begin
          state_d = S_EXC;
          cause_d = EXC_OVF;
        end else begin
          state_d = S_RTYPE2;
        end
      end
      S_STORE1: state_d = S_STORE2;
      S_LOAD1:  state_d = S_LOAD2;
      S_LOAD2:  state_d = S_LOAD3;
      S_BRANCH, S_RTYPE2, S_STORE2, S_LOAD3: begin
        if (irq) begin
          state_d = S_EXC;
          cause_d = EXC_IO;
        end else begin
          state_d = S_IFETCH;
        end
      end
      S_EXC:    state_d = S_IFETCH;
      default:  state_d = S_IFETCH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IFETCH;
      cause_q <= EXC_UNDEF;
    end else begin
      state   <= state_d;
      cause_q <= cause_d;
    end
  end

  // Control word per state ("don't care" entries set to the first input)
  always_comb begin
    ctrl        = '0;
    ctrl.srca   = SRCA_PC;
    ctrl.srcb   = SRCB_B;
    ctrl.alufn  = ALU_ADD;
    ctrl.dst    = DST_RT;
    ctrl.memin  = MEMIN_PC;
    ctrl.regin  = REGIN_MDR;
    ctrl.pcsrc  = PCSRC_ALU;
    ctrl.cause  = cause_q;
    unique case (state)
      S_IFETCH: begin
        ctrl.pc_we = 1'b1;
        ctrl.ir_we = 1'b1;
        ctrl.memin = MEMIN_PC;
        ctrl.srca  = SRCA_PC;
        ctrl.srcb  = SRCB_4;
        ctrl.alufn = ALU_ADD;
        ctrl.pcsrc = PCSRC_ALU;
      end
      S_DECODE: begin
        ctrl.srca  = SRCA_PC;
        ctrl.srcb  = SRCB_SE_SHL2;
        ctrl.alufn = ALU_ADD;
      end
      S_BRANCH: begin
        ctrl.pc_we = zero;
        ctrl.srca  = SRCA_A;
        ctrl.srcb  = SRCB_B;
        ctrl.alufn = ALU_SUB;
        ctrl.pcsrc = PCSRC_ALUOUT;
      end
      S_RTYPE1: begin
        ctrl.srca  = SRCA_A;
        ctrl.srcb  = SRCB_B;
        ctrl.alufn = (funct == FN_SUB) ? ALU_SUB : ALU_ADD;
      end
      S_RTYPE2: begin
        ctrl.reg_we = 1'b1;
        ctrl.dst    = DST_RD;
        ctrl.regin  = REGIN_ALUOUT;
      end
      S_STORE1, S_LOAD1: begin
        ctrl.srca  = SRCA_A;
        ctrl.srcb  = SRCB_SE;
        ctrl.alufn = ALU_ADD;
      end
      S_STORE2: begin
        ctrl.mem_we = 1'b1;
        ctrl.memin  = MEMIN_ALUOUT;
      end
      S_LOAD2: begin
        ctrl.memin = MEMIN_ALUOUT;
      end
      S_LOAD3: begin
        ctrl.reg_we = 1'b1;
        ctrl.dst    = DST_RT;
        ctrl.regin  = REGIN_MDR;
      end
      S_EXC: begin
        ctrl.pc_we  = 1'b1;
        ctrl.pcsrc  = PCSRC_EXC;
        ctrl.exc_we = 1'b1;
      end
      default: ;
    endcase
  end

  assign irq_ack = (state == S_EXC) && (cause_q == EXC_IO);

  // At most one architectural write per cycle besides the PC.
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl.mem_we, ctrl.reg_we, ctrl.ir_we, ctrl.exc_we}))
    else $error("mc_control: several writes in state %s", state.name());

endmodule
