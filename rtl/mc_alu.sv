// mc_alu -- the processor's single adder/subtractor.
//
// The multicycle machine has only one ALU.  It computes PC + 4 in IFetch, the
// branch target PC + SE(imm16) << 2 in Decode, load/store addresses
// A + SE(imm16), the R-type result A op B and, for beq, A - B whose Zero flag
// decides the branch.  The design names only + and - (add/sub), so those are
// the two functions built.
//
// Interface: purely combinational.  y = a + b or a - b (two's complement,
// wrapping).  zero is high when y is 0.  ovf flags signed overflow; it
// raises the overflow exception for R-type add/sub (the control FSM ignores it
// in every other state).
module mc_alu
  import mc_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alufn_e          fn,
  output logic [XLEN-1:0] y,
  output logic            zero,
  output logic            ovf
);

  logic [XLEN-1:0] b_eff;

  always_comb begin
    b_eff = (fn == ALU_SUB) ? ~b : b;
    y     = a + b_eff + {{(XLEN-1){1'b0}}, (fn == ALU_SUB)};
    zero  = (y == '0);
    // Signed overflow: both addends share a sign that the sum does not.
    ovf   = (a[XLEN-1] == b_eff[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
  end

endmodule
