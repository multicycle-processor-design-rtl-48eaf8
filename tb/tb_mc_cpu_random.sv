// tb_mc_cpu_random -- random programs on the whole processor, checked against
// an instruction-level model written here.
//
// Each program mixes lw/sw (data words 0x100-0x1FC), add/sub, forward beq and
// the odd undefined opcode, and ends in a halt loop (beq $0,$0,-1).  Data words
// are mostly small, with a few near 2^31 so that some programs overflow.  The
// model gives, per instruction, 3 (beq), 4 (add/sub/sw) or 5 (lw) cycles plus
// the exception cycle; after each run the testbench compares the cycle count,
// all 31 registers, the data memory and, for a trap, EPC and Cause.
module tb_mc_cpu_random;
  import mc_pkg::*;

  localparam int PROGRAMS = 100;
  localparam int LEN      = 120;           // instructions per program
  localparam logic [31:0] SPIN = {OP_BEQ, 5'd0, 5'd0, 16'hFFFF};

  logic        clk = 0, rst_n = 0, irq = 0, irq_ack;
  logic        host_en = 0, host_we = 0;
  logic [31:0] host_addr = 0, host_wdata = 0, host_rdata;
  logic [31:0] dbg_pc, dbg_epc, dbg_cause;
  state_e      dbg_state;
  int          checks = 0, failures = 0;
  int          n_ovf = 0, n_undef = 0, n_clean = 0;

  mc_cpu_top dut (
    .clk, .rst_n, .irq, .irq_ack, .host_en, .host_we, .host_addr, .host_wdata,
    .host_rdata, .dbg_pc, .dbg_state, .dbg_epc, .dbg_cause);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] img [1024];     // memory image loaded into the core
  logic [31:0] m_mem [1024];   // model memory
  logic [31:0] m_r [32];       // model registers

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

  function automatic logic [31:0] data_word();
    if ($urandom_range(0, 11) == 0) return 32'h7FFF_F000 + $urandom_range(0, 4095);
    return 32'($urandom_range(0, 2000)) - 32'd1000;
  endfunction

  function automatic logic [31:0] rand_instr(int i);
    int r, rs, rt, rd, k;
    r  = $urandom_range(0, 999);
    rs = $urandom_range(0, 7);          // few registers: more dependences
    rt = $urandom_range(0, 7);
    rd = $urandom_range(0, 7);
    k  = $urandom_range(0, 63);
    if (r < 300) return {OP_LW, 5'd0, 5'(rt), 16'(32'h100 + 4 * k)};
    if (r < 450) return {OP_SW, 5'd0, 5'(rt), 16'(32'h100 + 4 * k)};
    if (r < 630) return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_ADD};
    if (r < 800) return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_SUB};
    if (r < 997) return {OP_BEQ, 5'(rs), 5'(rt), 16'($urandom_range(0, (LEN - 1 - i) < 3 ? LEN - 1 - i : 3))};
    return {6'd8, 5'(rs), 5'(rt), 16'd0};  // undefined
  endfunction

  // Instruction-level model.  Returns the halt PC, cycles, and trap info.
  task automatic model(output logic [31:0] halt, output int cycles,
                       output bit trapped, output logic [31:0] epc, output logic [31:0] cause);
    logic [31:0] pc, ins, y;
    longint      s;
    pc = 32'h400; cycles = 0; trapped = 0; epc = 0; cause = 0;
    for (int i = 0; i < 32; i++) m_r[i] = 0;
    for (int i = 0; i < 1024; i++) m_mem[i] = img[i];
    forever begin
      ins = m_mem[pc[11:2]];
      if (ins == SPIN) break;
      case (ins[31:26])
        OP_LW: begin
          cycles += 5;
          y = m_r[ins[25:21]] + {{16{ins[15]}}, ins[15:0]};
          if (ins[20:16] != 0) m_r[ins[20:16]] = m_mem[y[11:2]];
          pc += 4;
        end
        OP_SW: begin
          cycles += 4;
          y = m_r[ins[25:21]] + {{16{ins[15]}}, ins[15:0]};
          m_mem[y[11:2]] = m_r[ins[20:16]];
          pc += 4;
        end
        OP_BEQ: begin
          cycles += 3;
          if (m_r[ins[25:21]] == m_r[ins[20:16]]) pc = pc + 4 + {{14{ins[15]}}, ins[15:0], 2'b00};
          else pc += 4;
        end
        OP_RTYPE: begin
          longint a, b;
          a = longint'($signed(m_r[ins[25:21]]));
          b = longint'($signed(m_r[ins[20:16]]));
          s = (ins[5:0] == FN_SUB) ? a - b : a + b;
          if (s > 64'sd2147483647 || s < -64'sd2147483648) begin
            cycles += 4; trapped = 1; epc = pc + 4; cause = 1; pc = 32'hC000_0020;
            break;
          end
          cycles += 4;
          if (ins[15:11] != 0) m_r[ins[15:11]] = s[31:0];
          pc += 4;
        end
        default: begin
          cycles += 3; trapped = 1; epc = pc + 4; cause = 0; pc = 32'hC000_0000;
          break;
        end
      endcase
    end
    halt = pc;
  endtask

  initial begin
    logic [31:0] halt, epc, cause, got;
    int          cycles, n;
    bit          trapped;

    repeat (2) @(posedge clk);
    for (int p = 0; p < PROGRAMS; p++) begin
      for (int i = 0; i < 1024; i++) img[i] = 32'h0;
      img[0] = SPIN;                                   // C000_0000 handler
      img[8] = SPIN;                                   // C000_0020 handler
      for (int k = 0; k < 64; k++) img[64 + k] = data_word();
      for (int i = 0; i < LEN; i++) img[256 + i] = rand_instr(i);
      img[256 + LEN] = SPIN;
      model(halt, cycles, trapped, epc, cause);

      for (int i = 0; i < 9; i++) poke(32'(4 * i), img[i]);
      for (int i = 64; i < 256 + LEN + 1; i++) poke(32'(4 * i), img[i]);

      @(negedge clk);
      host_en = 0;
      rst_n = 1;
      n = 0;
      do begin
        @(posedge clk); #1;
        n++;
      end while (!(dbg_state == S_IFETCH && dbg_pc == halt) && n < 5000);
      checks++;
      if (n != cycles) begin
        failures++;
        $display("FAIL program %0d: %0d cycles to %h, model %0d", p, n, halt, cycles);
      end
      if (trapped) begin
        checks++;
        if (dbg_epc != epc || dbg_cause != cause) begin
          failures++;
          $display("FAIL program %0d: EPC %h Cause %0d, model %h %0d", p, dbg_epc, dbg_cause, epc, cause);
        end
        if (cause == 1) n_ovf++; else n_undef++;
      end else n_clean++;
      for (int r = 1; r < 32; r++) begin
        checks++;
        if (dut.u_dp.u_rf.regs[r] != m_r[r]) begin
          failures++;
          $display("FAIL program %0d: $%0d = %h, model %h", p, r, dut.u_dp.u_rf.regs[r], m_r[r]);
        end
      end
      @(negedge clk);
      rst_n = 0;
      for (int k = 64; k < 128; k++) begin
        peek(32'(4 * k), got);
        checks++;
        if (got != m_mem[k]) begin
          failures++;
          $display("FAIL program %0d: mem[%h] = %h, model %h", p, 4 * k, got, m_mem[k]);
        end
      end
    end
    $display("programs: %0d ran to the end, %0d overflowed, %0d hit an undefined opcode",
             n_clean, n_ovf, n_undef);
    checks++;
    if (n_clean == 0 || n_ovf == 0 || n_undef == 0) begin
      failures++;
      $display("FAIL some program outcome never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
