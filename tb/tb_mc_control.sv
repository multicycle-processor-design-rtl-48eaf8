// tb_mc_control -- walks the control FSM through every instruction class and
// every exception, checking the state path, the cycle count per instruction
// (beq 3, add/sub 4, sw 4, lw 5, +1 for an exception) and, in every state,
// the write enables and the selects that the control table marks as used.
module tb_mc_control;
  import mc_pkg::*;

  logic       clk = 0, rst_n;
  logic [5:0] opcode, funct;
  logic       zero, ovf, irq, irq_ack;
  ctrl_t      ctrl;
  state_e     state;
  int         checks = 0, failures = 0;

  mc_control dut (.clk, .rst_n, .opcode, .funct, .zero, .ovf, .irq, .irq_ack, .ctrl, .state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (state %s)", msg, state.name());
  endtask

  // Expected control word fields, written out from the control table.
  task automatic check_ctrl(input exc_cause_e exp_cause);
    logic [3:0] we;   // PC, Mem, Reg, IR
    we = {ctrl.pc_we, ctrl.mem_we, ctrl.reg_we, ctrl.ir_we};
    checks++;
    case (state)
      S_IFETCH: if (we != 4'b1001 || ctrl.memin != MEMIN_PC || ctrl.srca != SRCA_PC ||
                    ctrl.srcb != SRCB_4 || ctrl.alufn != ALU_ADD || ctrl.pcsrc != PCSRC_ALU)
                  fail("IFetch control");
      S_DECODE: if (we != 4'b0000 || ctrl.srca != SRCA_PC || ctrl.srcb != SRCB_SE_SHL2 ||
                    ctrl.alufn != ALU_ADD)
                  fail("Decode control");
      S_BRANCH: if (we != {zero, 3'b000} || ctrl.srca != SRCA_A || ctrl.srcb != SRCB_B ||
                    ctrl.alufn != ALU_SUB || ctrl.pcsrc != PCSRC_ALUOUT)
                  fail("Branch control");
      S_RTYPE1: if (we != 4'b0000 || ctrl.srca != SRCA_A || ctrl.srcb != SRCB_B ||
                    ctrl.alufn != ((funct == 6'h22) ? ALU_SUB : ALU_ADD))
                  fail("RType1 control");
      S_RTYPE2: if (we != 4'b0010 || ctrl.dst != DST_RD || ctrl.regin != REGIN_ALUOUT)
                  fail("RType2 control");
      S_STORE1, S_LOAD1:
                if (we != 4'b0000 || ctrl.srca != SRCA_A || ctrl.srcb != SRCB_SE ||
                    ctrl.alufn != ALU_ADD)
                  fail("Store1/Load1 control");
      S_STORE2: if (we != 4'b0100 || ctrl.memin != MEMIN_ALUOUT) fail("Store2 control");
      S_LOAD2:  if (we != 4'b0000 || ctrl.memin != MEMIN_ALUOUT) fail("Load2 control");
      S_LOAD3:  if (we != 4'b0010 || ctrl.dst != DST_RT || ctrl.regin != REGIN_MDR)
                  fail("Load3 control");
      S_EXC:    if (we != 4'b1000 || !ctrl.exc_we || ctrl.pcsrc != PCSRC_EXC ||
                    ctrl.cause != exp_cause || irq_ack != (exp_cause == EXC_IO))
                  fail("Exc control");
      default:  fail("illegal state");
    endcase
    if (state != S_EXC && (ctrl.exc_we || irq_ack)) fail("exception write outside Exc");
  endtask

  // Run one instruction from IFetch back to IFetch and compare the path.
  task automatic run(input string name, input logic [5:0] op, input logic [5:0] fn,
                     input logic z, input logic ov, input logic rq,
                     input state_e exp_path[$], input exc_cause_e exp_cause);
    state_e path[$];
    opcode = op; funct = fn; zero = z; ovf = ov; irq = rq;
    checks++;
    if (state != S_IFETCH) fail({name, ": not starting in IFetch"});
    do begin
      path.push_back(state);
      check_ctrl(exp_cause);
      @(posedge clk);
      #1;
    end while (state != S_IFETCH && path.size() < 10);
    checks++;
    if (path != exp_path) begin
      fail({name, ": wrong state path"});
      foreach (path[i]) $display("  got %s", path[i].name());
    end
    checks++;
    if (path.size() != exp_path.size()) fail({name, ": wrong cycle count"});
  endtask

  initial begin
    rst_n = 0; opcode = 0; funct = 0; zero = 0; ovf = 0; irq = 0;
    @(posedge clk); #1;
    rst_n = 1;
    checks++;
    if (state != S_IFETCH) fail("reset state");
    run("beq taken",     6'd4,  6'h00, 1, 0, 0, '{S_IFETCH, S_DECODE, S_BRANCH}, EXC_UNDEF);
    run("beq not taken", 6'd4,  6'h00, 0, 0, 0, '{S_IFETCH, S_DECODE, S_BRANCH}, EXC_UNDEF);
    run("add",           6'd0,  6'h20, 0, 0, 0, '{S_IFETCH, S_DECODE, S_RTYPE1, S_RTYPE2}, EXC_UNDEF);
    run("sub",           6'd0,  6'h22, 0, 0, 0, '{S_IFETCH, S_DECODE, S_RTYPE1, S_RTYPE2}, EXC_UNDEF);
    run("sw",            6'd43, 6'h00, 0, 0, 0, '{S_IFETCH, S_DECODE, S_STORE1, S_STORE2}, EXC_UNDEF);
    run("lw",            6'd35, 6'h00, 0, 0, 0, '{S_IFETCH, S_DECODE, S_LOAD1, S_LOAD2, S_LOAD3}, EXC_UNDEF);
    // ovf is ignored outside RType1
    run("lw with ovf",   6'd35, 6'h00, 0, 1, 0, '{S_IFETCH, S_DECODE, S_LOAD1, S_LOAD2, S_LOAD3}, EXC_UNDEF);
    run("undef opcode",  6'd8,  6'h00, 0, 0, 0, '{S_IFETCH, S_DECODE, S_EXC}, EXC_UNDEF);
    run("undef funct",   6'd0,  6'h24, 0, 0, 0, '{S_IFETCH, S_DECODE, S_EXC}, EXC_UNDEF);
    run("add overflow",  6'd0,  6'h20, 0, 1, 0, '{S_IFETCH, S_DECODE, S_RTYPE1, S_EXC}, EXC_OVF);
    run("irq after beq", 6'd4,  6'h00, 0, 0, 1, '{S_IFETCH, S_DECODE, S_BRANCH, S_EXC}, EXC_IO);
    run("irq after lw",  6'd35, 6'h00, 0, 0, 1, '{S_IFETCH, S_DECODE, S_LOAD1, S_LOAD2, S_LOAD3, S_EXC}, EXC_IO);
    run("irq after sw",  6'd43, 6'h00, 0, 0, 1, '{S_IFETCH, S_DECODE, S_STORE1, S_STORE2, S_EXC}, EXC_IO);
    run("irq after sub", 6'd0,  6'h22, 0, 0, 1, '{S_IFETCH, S_DECODE, S_RTYPE1, S_RTYPE2, S_EXC}, EXC_IO);
    run("add after irq", 6'd0,  6'h20, 0, 0, 0, '{S_IFETCH, S_DECODE, S_RTYPE1, S_RTYPE2}, EXC_IO);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
