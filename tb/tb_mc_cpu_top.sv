// tb_mc_cpu_top -- end-to-end test of the multicycle processor at its default
// parameters (1024-word memory, reset PC 0x400).
//
// Programs are assembled here, loaded through the host port while the core is
// held in reset, and run until the PC reaches a one-instruction spin loop
// (beq $0,$0,-1).  Scenarios:
//   1. Instruction-mix loop: each iteration is 5 ALU ops, 2 loads, 1 store and
//      2 branches (50/20/10/20 %).  With 4/5/4/3 cycles per class this must
//      take exactly 40 cycles per iteration (CPI 4.0); results are checked
//      against sums computed here.
//   2. Overflow: add of 0x7FFFFFFF + 1 traps to C000_0020, no writeback.
//   3. Undefined instruction, by function code and by opcode: trap to
//      C000_0000.
//   4. I/O request during a loop: trap to C000_0040 between instructions.
// Handlers live at the low memory words that C000_00xx aliases to.
// Every mechanism (each instruction kind, taken and not-taken beq, a dropped
// write to $0, the three exception causes, the irq/irq_ack handshake) is
// counted, and one that never happened counts as a failure.
module tb_mc_cpu_top;
  import mc_pkg::*;

  localparam logic [31:0] HALT_OVF  = 32'hC000_0024;
  localparam logic [31:0] HALT_UND  = 32'hC000_0004;
  localparam logic [31:0] HALT_IO   = 32'hC000_0044;
  localparam int          N         = 16;   // loop iterations in scenario 1

  logic        clk = 0, rst_n = 0, irq = 0, irq_ack;
  logic        host_en = 0, host_we = 0;
  logic [31:0] host_addr = 0, host_wdata = 0, host_rdata;
  logic [31:0] dbg_pc, dbg_epc, dbg_cause;
  state_e      dbg_state;
  int          checks = 0, failures = 0;
  longint      cycle = 0;
  logic [31:0] last_epc, last_cause;   // EPC/Cause when a run stopped

  mc_cpu_top dut (
    .clk, .rst_n, .irq, .irq_ack, .host_en, .host_we, .host_addr, .host_wdata,
    .host_rdata, .dbg_pc, .dbg_state, .dbg_epc, .dbg_cause);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ------------------------------------------------
  int n_lw, n_sw, n_add, n_sub, n_beq_taken, n_beq_not, n_r0_write;
  int n_exc_undef, n_exc_ovf, n_exc_io, n_irq_ack;
  int n_undef_funct, n_undef_op;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      case (dbg_state)
        S_LOAD3:  n_lw++;
        S_STORE2: n_sw++;
        S_RTYPE2: begin
          if (dut.u_dp.funct == FN_SUB) n_sub++; else n_add++;
          if (dut.u_dp.ir[15:11] == 5'd0) n_r0_write++;
        end
        S_BRANCH: if (dut.u_dp.zero) n_beq_taken++; else n_beq_not++;
        S_EXC: begin
          case (dut.u_ctrl.ctrl.cause)
            EXC_UNDEF: begin
              n_exc_undef++;
              if (dut.u_dp.opcode == OP_RTYPE) n_undef_funct++; else n_undef_op++;
            end
            EXC_OVF:   n_exc_ovf++;
            default:   n_exc_io++;
          endcase
          if (irq_ack) n_irq_ack++;
        end
        default: ;
      endcase
    end
  end

  // ---- assembler -----------------------------------------------------------
  function automatic logic [31:0] rtype(int rs, int rt, int rd, logic [5:0] fn);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] itype(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] lw(int rt, int imm, int rs);  return itype(OP_LW, rs, rt, imm); endfunction
  function automatic logic [31:0] sw(int rt, int imm, int rs);  return itype(OP_SW, rs, rt, imm); endfunction
  function automatic logic [31:0] beq(int rs, int rt, int off); return itype(OP_BEQ, rs, rt, off); endfunction
  function automatic logic [31:0] add(int rd, int rs, int rt);  return rtype(rs, rt, rd, FN_ADD); endfunction
  function automatic logic [31:0] sub(int rd, int rs, int rt);  return rtype(rs, rt, rd, FN_SUB); endfunction
  localparam logic [31:0] SPIN = {OP_BEQ, 5'd0, 5'd0, 16'hFFFF};  // beq $0,$0,-1

  // ---- host port -----------------------------------------------------------
  task automatic poke(input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = addr; host_wdata = data;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic peek(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = addr;
    #1 data = host_rdata;
  endtask

  task automatic clear_mem();
    for (int i = 0; i < 1024; i++) poke(32'(i * 4), 32'hDEAD_0000 | 32'(i));
  endtask

  task automatic expect_mem(input string what, input logic [31:0] addr, input logic [31:0] exp);
    logic [31:0] got;
    peek(addr, got);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: mem[%h] = %h, expected %h", what, addr, got, exp);
    end
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, exp);
    end
  endtask

  // Release reset, run until the PC sits at halt in IFetch, hold reset again.
  task automatic run(input logic [31:0] halt, input int max_cycles, output int cycles);
    @(negedge clk);
    host_en = 0;
    rst_n = 1;
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
    end while (!(dbg_state == S_IFETCH && dbg_pc == halt) && cycles < max_cycles);
    checks++;
    if (cycles >= max_cycles) begin
      failures++;
      $display("FAIL program did not reach %h (pc %h)", halt, dbg_pc);
    end
    last_epc   = dbg_epc;
    last_cause = dbg_cause;
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
  endtask

  // Scenario 1 bookkeeping: cycle numbers of each arrival at the loop head
  longint loop_starts[$];
  logic   watch_loop = 0;
  always @(posedge clk)
    if (rst_n && watch_loop && dbg_state == S_IFETCH && dbg_pc == 32'h410) loop_starts.push_back(cycle);

  initial begin
    int          cycles, p, sum;
    logic [31:0] a [N], b [N];

    // -------- reset with host access
    rst_n = 0;
    repeat (2) @(posedge clk);
    clear_mem();

    // ======== Scenario 1: instruction-mix loop ============================
    sum = 0;
    for (int i = 0; i < N; i++) begin
      a[i] = $urandom_range(0, 100000);
      b[i] = $urandom_range(0, 100000);
      sum += int'(a[i]);
      poke(32'h10C + 32'(4 * i), a[i]);
      poke(32'h200 + 32'(4 * i), b[i]);
    end
    poke(32'h100, N);
    poke(32'h104, 1);
    poke(32'h108, 4);
    p = 32'h400;
    poke(p, lw(1, 16'h100, 0)); p += 4;     // $1 = N
    poke(p, lw(2, 16'h104, 0)); p += 4;     // $2 = 1
    poke(p, lw(9, 16'h108, 0)); p += 4;     // $9 = 4
    poke(p, add(0, 2, 2));      p += 4;     // write to $0 is dropped
    // loop head at 0x410
    poke(p, lw(4, 16'h10C, 5)); p += 4;     // $4 = a[i]
    poke(p, add(6, 6, 4));      p += 4;     // sum += a[i]
    poke(p, lw(7, 16'h200, 5)); p += 4;     // $7 = b[i]
    poke(p, sub(8, 4, 7));      p += 4;     // $8 = a[i] - b[i]
    poke(p, sw(8, 16'h300, 5)); p += 4;     // c[i] = $8
    poke(p, add(5, 5, 9));      p += 4;     // i += 4
    poke(p, sub(1, 1, 2));      p += 4;     // count--
    poke(p, add(10, 10, 2));    p += 4;     // iterations++
    poke(p, beq(1, 0, 1));      p += 4;     // 0x430: exit when count == 0
    poke(p, beq(0, 0, -10));    p += 4;     // 0x434: back to 0x410
    poke(p, sw(6, 16'h0F0, 0)); p += 4;     // 0x438
    poke(p, sw(10, 16'h0F4, 0)); p += 4;
    poke(p, sw(0, 16'h0F8, 0)); p += 4;
    poke(p, SPIN);                          // 0x444

    watch_loop = 1;
    run(32'h444, 5000, cycles);
    watch_loop = 0;
    expect_mem("sum of a[]", 32'h0F0, 32'(sum));
    expect_mem("iteration count", 32'h0F4, N);
    expect_mem("register 0", 32'h0F8, 0);
    for (int i = 0; i < N; i++)
      expect_mem("c[i] = a[i] - b[i]", 32'h300 + 32'(4 * i), a[i] - b[i]);
    // Cycle counts: setup 3 lw + add = 19; N-1 full iterations of 40;
    // last iteration 8 instructions (34) + taken exit beq (3); 3 sw (12).
    expect_eq("total cycles", cycles, 19 + 40 * (N - 1) + 37 + 12);
    expect_eq("loop head visits", loop_starts.size(), N);
    for (int i = 1; i < loop_starts.size(); i++)
      expect_eq("cycles per iteration (10 instructions, CPI 4.0)",
                32'(loop_starts[i] - loop_starts[i-1]), 40);
    $display("instruction mix: %0d cycles per 10-instruction iteration, CPI %0.2f",
             loop_starts[1] - loop_starts[0], real'(loop_starts[1] - loop_starts[0]) / 10.0);

    // ======== Scenario 2: arithmetic overflow =============================
    poke(32'h0C0, 32'h7FFF_FFFF);
    poke(32'h0C4, 32'd1);
    poke(32'h0D0, 32'h5555_5555);
    poke(32'h0E0, 32'h5555_5555);
    poke(32'h400, lw(1, 16'h0C0, 0));
    poke(32'h404, lw(2, 16'h0C4, 0));
    poke(32'h408, add(3, 1, 2));            // overflows
    poke(32'h40C, sw(3, 16'h0E0, 0));       // must not run
    poke(32'h020, sw(3, 16'h0D0, 0));       // handler at C000_0020
    poke(32'h024, SPIN);
    run(HALT_OVF, 200, cycles);
    expect_eq("overflow EPC", last_epc, 32'h40C);
    expect_eq("overflow Cause", last_cause, 32'd1);
    expect_mem("no writeback on overflow", 32'h0D0, 32'd0);
    expect_mem("instruction after overflow not run", 32'h0E0, 32'h5555_5555);
    // lw 5 + lw 5 + add up to RType1 3 + Exc 1 + handler sw 4
    expect_eq("overflow cycles", cycles, 18);

    // ======== Scenario 3a: undefined function code ========================
    poke(32'h400, lw(1, 16'h0C4, 0));
    poke(32'h404, rtype(1, 1, 3, 6'h24));   // 'and' is not implemented
    poke(32'h000, sw(1, 16'h0D4, 0));       // handler at C000_0000
    poke(32'h004, SPIN);
    run(HALT_UND, 200, cycles);
    expect_eq("undefined funct EPC", last_epc, 32'h408);
    expect_eq("undefined funct Cause", last_cause, 32'd0);
    expect_mem("undefined funct handler ran", 32'h0D4, 32'd1);
    expect_eq("undefined funct cycles", cycles, 5 + 3 + 4);

    // ======== Scenario 3b: undefined opcode ===============================
    poke(32'h0D4, 32'h0);
    poke(32'h400, itype(6'd8, 0, 1, 5));    // addi is not implemented
    run(HALT_UND, 200, cycles);
    expect_eq("undefined opcode EPC", last_epc, 32'h404);
    expect_eq("undefined opcode Cause", last_cause, 32'd0);
    expect_mem("undefined opcode: handler stores $1 = 0", 32'h0D4, 32'd0);

    // ======== Scenario 4: I/O request =====================================
    poke(32'h400, lw(1, 16'h0C4, 0));
    poke(32'h404, add(2, 2, 1));            // loop: $2++
    poke(32'h408, beq(0, 0, -2));           //       back to 0x404
    poke(32'h040, sw(2, 16'h0D8, 0));       // handler at C000_0040
    poke(32'h044, SPIN);
    fork
      run(HALT_IO, 500, cycles);
      begin : device
        int adds_before, latency;
        repeat (100) @(posedge clk);
        @(negedge clk);
        irq = 1;
        latency = 0;
        do begin
          @(posedge clk); #1;
          latency++;
        end while (!irq_ack && latency < 50);
        adds_before = n_add;
        @(negedge clk);
        irq = 0;
        // The request is taken at the end of the instruction in flight:
        // at most 4 cycles (add) plus the Exc state.
        checks++;
        if (latency > 5) begin
          failures++;
          $display("FAIL irq latency %0d cycles", latency);
        end
      end
    join
    checks++;
    if (last_epc != 32'h404 && last_epc != 32'h408) begin
      failures++;
      $display("FAIL irq EPC %h is not an instruction of the loop", last_epc);
    end
    expect_eq("irq Cause", last_cause, 32'd2);
    begin
      logic [31:0] stored;
      peek(32'h0D8, stored);
      checks++;
      if (stored == 0 || stored > 100) begin
        failures++;
        $display("FAIL irq handler stored %0d adds", stored);
      end
    end

    // ======== mechanism coverage ==========================================
    $display("mechanisms: lw=%0d sw=%0d add=%0d sub=%0d beq_taken=%0d beq_not=%0d r0_write=%0d",
             n_lw, n_sw, n_add, n_sub, n_beq_taken, n_beq_not, n_r0_write);
    $display("exceptions: undef=%0d (funct %0d, opcode %0d) ovf=%0d io=%0d irq_ack=%0d",
             n_exc_undef, n_undef_funct, n_undef_op, n_exc_ovf, n_exc_io, n_irq_ack);
    begin
      int counts[12];
      counts = '{n_lw, n_sw, n_add, n_sub, n_beq_taken, n_beq_not, n_r0_write,
                 n_undef_funct, n_undef_op, n_exc_ovf, n_exc_io, n_irq_ack};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
