// mc_reg -- clocked register with write enable and synchronous reset.
//
// The multicycle datapath cuts the single-cycle critical path by storing every
// intermediate result in a register: PC and IR (written only when the control
// FSM says so) and MDR, A, B and ALUOut (written every cycle, EN tied high).
// This one module serves all of them.
//
// Interface: d is captured into q on the rising edge of clk when en is high.
// rst_n is active low and synchronous and loads RESET_VAL.  The reset style
// and reset values are own choices; the design does not specify them.
module mc_reg #(
  parameter int               WIDTH     = 32,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= RESET_VAL;
    else if (en) q <= d;
  end

endmodule
