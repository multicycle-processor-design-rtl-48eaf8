// mc_signext -- the SignExtnd and <<2 boxes of the datapath.
//
// Sign-extends the 16-bit immediate IR[15:0] to 32 bits (used for load/store
// addresses, A + SE(imm16)) and also presents it shifted left by two (used for
// the beq target, PC + SE(imm16) << 2, where the immediate counts words).
//
// Interface: purely combinational.  Both functions are bit replication and
// reordering, so the block synthesizes to wires and no gates; it is kept as a
// module because the datapath treats it as a unit of its own.
module mc_signext
  import mc_pkg::*;
(
  input  logic [15:0]     imm16,
  output logic [XLEN-1:0] se,
  output logic [XLEN-1:0] se_shl2
);

  assign se      = {{(XLEN-16){imm16[15]}}, imm16};
  assign se_shl2 = {se[XLEN-3:0], 2'b00};

endmodule
