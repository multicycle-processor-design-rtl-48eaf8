// mc_cpu_top -- the multicycle processor: control FSM, datapath and the one
// shared memory.
//
// Instructions take 3 (beq), 4 (add, sub, sw) or 5 (lw) cycles; exceptions add
// one cycle.  See mc_control for the state sequence and mc_datapath for the
// registers and muxes.
//
// Host port (own choice, not part of the design): while rst_n is low the
// core is idle and host_en hands the memory port to host_addr/host_we/
// host_wdata, so a program can be loaded and results read back on host_rdata
// (combinational).  host_en must stay low while the core runs.
//
// Debug outputs: dbg_pc, dbg_state, dbg_epc, dbg_cause.
// irq/irq_ack: I/O exception request and its acknowledge (see mc_control).
module mc_cpu_top
  import mc_pkg::*;
#(
  parameter int              WORDS    = 1024,
  parameter logic [XLEN-1:0] RESET_PC = 32'h0000_0400
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            irq,
  output logic            irq_ack,
  input  logic            host_en,
  input  logic            host_we,
  input  logic [XLEN-1:0] host_addr,
  input  logic [XLEN-1:0] host_wdata,
  output logic [XLEN-1:0] host_rdata,
  output logic [XLEN-1:0] dbg_pc,
  output state_e          dbg_state,
  output logic [XLEN-1:0] dbg_epc,
  output logic [XLEN-1:0] dbg_cause
);

  ctrl_t           ctrl;
  logic [5:0]      opcode, funct;
  logic            zero, ovf;
  logic [XLEN-1:0] cpu_addr, cpu_wdata, mem_addr, mem_wdata, mem_rdata;
  logic            cpu_we, mem_we;

  mc_control u_ctrl (
    .clk, .rst_n, .opcode, .funct, .zero, .ovf, .irq, .irq_ack,
    .ctrl, .state(dbg_state));

  mc_datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk, .rst_n, .ctrl, .opcode, .funct, .zero, .ovf,
    .mem_addr(cpu_addr), .mem_wdata(cpu_wdata), .mem_we(cpu_we),
    .mem_rdata, .pc(dbg_pc), .epc(dbg_epc), .cause(dbg_cause));

  assign mem_addr   = host_en ? host_addr  : cpu_addr;
  assign mem_wdata  = host_en ? host_wdata : cpu_wdata;
  assign mem_we     = host_en ? host_we    : (cpu_we && rst_n);
  assign host_rdata = mem_rdata;

  mc_memory #(.WORDS(WORDS)) u_mem (
    .clk, .we(mem_we), .addr(mem_addr), .din(mem_wdata), .dout(mem_rdata));

  a_host_in_reset: assert property (@(posedge clk) host_en |-> !rst_n)
    else $error("mc_cpu_top: host access while the core runs");

endmodule
