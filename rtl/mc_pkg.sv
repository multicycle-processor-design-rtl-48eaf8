// mc_pkg -- types and constants shared by the multicycle processor.
//
// The processor runs a four-instruction subset of MIPS (add/sub, lw, sw, beq)
// and spends 3 to 5 clock cycles per instruction.  This package holds the
// instruction-field constants, the states of the control FSM, the encodings of
// the six datapath multiplexers and the control word (ctrl_t) that the control
// FSM drives into the datapath every cycle.
//
// Taken from the design: the opcodes (lw 35, sw 43, beq 4, R-type 0), the
// states, the mux inputs and the exception handler addresses C000_0000,
// C000_0020 and C000_0040.  Own choices: the add/sub function codes (the MIPS
// values 0x20 and 0x22), the bit encodings of all enums, and the cause codes
// 0/1/2, chosen so that handler address = EXC_BASE + cause * EXC_STRIDE.
package mc_pkg;

  localparam int XLEN = 32;

  // Opcodes, IR[31:26]
  localparam logic [5:0] OP_RTYPE = 6'd0;
  localparam logic [5:0] OP_BEQ   = 6'd4;
  localparam logic [5:0] OP_LW    = 6'd35;
  localparam logic [5:0] OP_SW    = 6'd43;

  // R-type function codes, IR[5:0]
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;

  // Exception handler addresses: C000_0000 + 0x20 * cause
  localparam logic [XLEN-1:0] EXC_BASE   = 32'hC000_0000;
  localparam logic [XLEN-1:0] EXC_STRIDE = 32'h0000_0020;

  typedef enum logic [3:0] {
    S_IFETCH = 4'd0,   // IR = Mem[PC]; PC = PC + 4
    S_DECODE = 4'd1,   // A = Reg[Rs]; B = Reg[Rt]; ALUOut = PC + SE(imm16) << 2
    S_BRANCH = 4'd2,   // Zero = A - B; if (Zero) PC = ALUOut
    S_RTYPE1 = 4'd3,   // ALUOut = A op B
    S_RTYPE2 = 4'd4,   // Reg[Rd] = ALUOut
    S_STORE1 = 4'd5,   // ALUOut = A + SE(imm16)
    S_STORE2 = 4'd6,   // Mem[ALUOut] = B
    S_LOAD1  = 4'd7,   // ALUOut = A + SE(imm16)
    S_LOAD2  = 4'd8,   // MDR = Mem[ALUOut]
    S_LOAD3  = 4'd9,   // Reg[Rt] = MDR
    S_EXC    = 4'd10   // EPC = PC; Cause = cause; PC = handler
  } state_e;

  typedef enum logic [1:0] {
    EXC_UNDEF = 2'd0,  // undefined instruction
    EXC_OVF   = 2'd1,  // arithmetic overflow
    EXC_IO    = 2'd2   // I/O device request (interrupt)
  } exc_cause_e;

  typedef enum logic       {SRCA_PC, SRCA_A}                          srca_e;
  typedef enum logic [1:0] {SRCB_B, SRCB_4, SRCB_SE, SRCB_SE_SHL2}    srcb_e;
  typedef enum logic       {ALU_ADD, ALU_SUB}                         alufn_e;
  typedef enum logic       {DST_RT, DST_RD}                           dst_e;
  typedef enum logic       {MEMIN_PC, MEMIN_ALUOUT}                   memin_e;
  typedef enum logic       {REGIN_MDR, REGIN_ALUOUT}                  regin_e;
  typedef enum logic [1:0] {PCSRC_ALU, PCSRC_ALUOUT, PCSRC_EXC}       pcsrc_e;

  // One control word per cycle, named after the labels of the datapath.
  typedef struct packed {
    logic       pc_we;
    logic       mem_we;
    logic       reg_we;
    logic       ir_we;
    srca_e      srca;
    srcb_e      srcb;
    alufn_e     alufn;
    dst_e       dst;
    memin_e     memin;
    regin_e     regin;
    pcsrc_e     pcsrc;
    logic       exc_we;   // load EPC and Cause
    exc_cause_e cause;
  } ctrl_t;

endpackage
