// mc_exc_regs -- exception state: EPC, Cause and the handler address.
//
// When the control FSM takes an exception it saves the PC into EPC, records
// why in Cause, and loads the PC with the handler address of that cause:
// undefined instruction -> C000_0000, overflow -> C000_0020,
// I/O request -> C000_0040.  The three addresses are the design's; that they
// are EXC_BASE + cause * EXC_STRIDE is how this block computes them.
//
// Interface: vector is combinational from cause_in.  epc and cause load on the
// rising clock edge when we is high (synchronous active-low reset to 0).  The
// Cause register holds the cause code in its low bits; the register width and
// code values are own choices.
module mc_exc_regs
  import mc_pkg::*;
#(
  parameter logic [XLEN-1:0] BASE   = EXC_BASE,
  parameter logic [XLEN-1:0] STRIDE = EXC_STRIDE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  exc_cause_e      cause_in,
  input  logic [XLEN-1:0] pc_in,
  output logic [XLEN-1:0] vector,
  output logic [XLEN-1:0] epc,
  output logic [XLEN-1:0] cause
);

  assign vector = BASE + STRIDE * XLEN'(cause_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      epc   <= '0;
      cause <= '0;
    end else if (we) begin
      epc   <= pc_in;
      cause <= XLEN'(cause_in);
    end
  end

endmodule
