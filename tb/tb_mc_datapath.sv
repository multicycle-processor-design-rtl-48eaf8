// tb_mc_datapath -- runs a short program on the datapath alone.  The
// testbench plays the control FSM (its own transcription of the control
// table) and the memory (a model array), then checks the stored results,
// the PC after taken/not-taken branches, a negative address offset, and the
// overflow exception entry (EPC, Cause, PC = C000_0020).
module tb_mc_datapath;
  import mc_pkg::*;

  logic        clk = 0, rst_n;
  ctrl_t       ctrl;
  logic [5:0]  opcode, funct;
  logic        zero, ovf;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, pc, epc, cause;
  logic        mem_we;
  logic [31:0] mem [1024];
  int          checks = 0, failures = 0;

  mc_datapath #(.RESET_PC(32'h0000_0400)) dut (
    .clk, .rst_n, .ctrl, .opcode, .funct, .zero, .ovf,
    .mem_addr, .mem_wdata, .mem_we, .mem_rdata, .pc, .epc, .cause);

  always #5 clk = ~clk;
  assign mem_rdata = mem[mem_addr[11:2]];
  always @(posedge clk) if (mem_we) mem[mem_addr[11:2]] <= mem_wdata;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rtype(int rs, int rt, int rd, logic [5:0] fn);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] itype(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  task automatic apply(input ctrl_t c);
    ctrl = c;
    #1;
    if (ctrl.pcsrc == PCSRC_ALUOUT && !ctrl.mem_we && !ctrl.reg_we && !ctrl.ir_we)
      ctrl.pc_we = zero;  // Branch state: PC_WE = Zero
    @(posedge clk);
    #1;
  endtask

  function automatic ctrl_t idle();
    ctrl_t c = '0;
    return c;
  endfunction

  // Execute the instruction at PC through all of its control steps.
  task automatic execute(output logic took_exc);
    ctrl_t c;
    took_exc = 0;
    c = idle(); c.pc_we = 1; c.ir_we = 1; c.memin = MEMIN_PC; c.srca = SRCA_PC;
    c.srcb = SRCB_4; c.alufn = ALU_ADD; c.pcsrc = PCSRC_ALU;
    apply(c);
    c = idle(); c.srca = SRCA_PC; c.srcb = SRCB_SE_SHL2; c.alufn = ALU_ADD;
    apply(c);
    case (opcode)
      6'd4: begin
        c = idle(); c.srca = SRCA_A; c.srcb = SRCB_B; c.alufn = ALU_SUB; c.pcsrc = PCSRC_ALUOUT;
        apply(c);
      end
      6'd0: begin
        c = idle(); c.srca = SRCA_A; c.srcb = SRCB_B;
        c.alufn = (funct == 6'h22) ? ALU_SUB : ALU_ADD;
        ctrl = c; #1;
        if (ovf) begin
          apply(c);
          c = idle(); c.pc_we = 1; c.pcsrc = PCSRC_EXC; c.exc_we = 1; c.cause = EXC_OVF;
          apply(c);
          took_exc = 1;
        end else begin
          apply(c);
          c = idle(); c.reg_we = 1; c.dst = DST_RD; c.regin = REGIN_ALUOUT;
          apply(c);
        end
      end
      6'd43: begin
        c = idle(); c.srca = SRCA_A; c.srcb = SRCB_SE; c.alufn = ALU_ADD;
        apply(c);
        c = idle(); c.mem_we = 1; c.memin = MEMIN_ALUOUT;
        apply(c);
      end
      6'd35: begin
        c = idle(); c.srca = SRCA_A; c.srcb = SRCB_SE; c.alufn = ALU_ADD;
        apply(c);
        c = idle(); c.memin = MEMIN_ALUOUT;
        apply(c);
        c = idle(); c.reg_we = 1; c.dst = DST_RT; c.regin = REGIN_MDR;
        apply(c);
      end
      default: begin
        failures++;
        $display("FAIL unexpected opcode %0d at %h", opcode, pc);
      end
    endcase
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic exc;
    int   p;
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    mem[32'h100 >> 2] = 32'd1000;
    mem[32'h104 >> 2] = 32'd58;
    mem[32'h118 >> 2] = 32'h0000_0120;
    mem[32'h11C >> 2] = 32'h7FFF_FFFF;
    p = 32'h400 >> 2;
    mem[p++] = itype(6'd35, 0, 1, 16'h100);   // lw  $1, 0x100($0)
    mem[p++] = itype(6'd35, 0, 2, 16'h104);   // lw  $2, 0x104($0)
    mem[p++] = rtype(1, 2, 3, 6'h20);         // add $3, $1, $2
    mem[p++] = rtype(1, 2, 4, 6'h22);         // sub $4, $1, $2
    mem[p++] = itype(6'd43, 0, 3, 16'h108);   // sw  $3, 0x108($0)
    mem[p++] = itype(6'd43, 0, 4, 16'h10C);   // sw  $4, 0x10C($0)
    mem[p++] = itype(6'd4, 3, 3, 1);          // beq $3, $3, +1   (taken)
    mem[p++] = itype(6'd43, 0, 1, 16'h110);   // sw  $1, 0x110($0) (skipped)
    mem[p++] = itype(6'd4, 1, 2, 1);          // beq $1, $2, +1   (not taken)
    mem[p++] = itype(6'd43, 0, 2, 16'h114);   // sw  $2, 0x114($0)
    mem[p++] = itype(6'd35, 0, 7, 16'h118);   // lw  $7, 0x118($0)
    mem[p++] = itype(6'd43, 7, 1, -8);        // sw  $1, -8($7)   -> 0x118
    mem[p++] = rtype(1, 1, 0, 6'h20);         // add $0, $1, $1  (write is dropped)
    mem[p++] = itype(6'd43, 0, 0, 16'h124);   // sw  $0, 0x124($0)
    mem[p++] = itype(6'd35, 0, 5, 16'h11C);   // lw  $5, 0x11C($0)
    mem[p++] = rtype(5, 5, 6, 6'h20);         // add $6, $5, $5   (overflow, at 0x43C)
    mem[32'h120 >> 2] = 32'hFFFF_FFFF;
    mem[32'h124 >> 2] = 32'hFFFF_FFFF;

    ctrl = idle();
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    expect_eq("reset PC", pc, 32'h400);
    expect_eq("fetch address", mem_addr, 32'h400);

    for (int i = 0; i < 6; i++) execute(exc);
    expect_eq("PC after 6 instructions", pc, 32'h418);
    expect_eq("add result", mem[32'h108 >> 2], 32'd1058);
    expect_eq("sub result", mem[32'h10C >> 2], 32'd942);
    execute(exc);
    expect_eq("PC after taken beq", pc, 32'h420);
    expect_eq("skipped store", mem[32'h110 >> 2], 32'd0);
    execute(exc);
    expect_eq("PC after not-taken beq", pc, 32'h424);
    execute(exc);
    expect_eq("store after not-taken beq", mem[32'h114 >> 2], 32'd58);
    execute(exc);
    execute(exc);
    expect_eq("negative offset store", mem[32'h118 >> 2], 32'd1000);
    execute(exc);
    execute(exc);
    expect_eq("register 0 stays zero", mem[32'h124 >> 2], 32'd0);
    execute(exc);
    execute(exc);
    checks++;
    if (!exc) begin failures++; $display("FAIL overflow not flagged"); end
    expect_eq("PC after overflow", pc, 32'hC000_0020);
    expect_eq("EPC after overflow", epc, 32'h0000_0440);  // EPC = PC = 0x43C + 4
    expect_eq("Cause after overflow", cause, 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
