// mc_memory -- the single memory shared by instructions and data.
//
// The multicycle machine fetches instructions (IFetch: IR = Mem[PC]) and
// accesses data (Load2: MDR = Mem[ALUOut], Store2: Mem[ALUOut] = B) through
// the same memory, in different cycles; the MemIn mux in front of Addr picks
// PC or ALUOut.
//
// Interface: addr is a byte address; the word at addr[AW+1:2] is read
// combinationally on dout, so the fetched instruction or loaded word is
// captured by IR or MDR at the end of the same cycle.  When we (WrEn) is high,
// din is written at the rising clock edge.  Upper address bits are ignored, so
// the memory repeats every 4*WORDS bytes.  Size, word-only access and the
// aliasing are own choices; the design gives none of them.
module mc_memory
  import mc_pkg::*;
#(
  parameter int WORDS = 1024,
  localparam int AW   = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [XLEN-1:0] addr,
  input  logic [XLEN-1:0] din,
  output logic [XLEN-1:0] dout
);

  logic [XLEN-1:0] mem [WORDS];
  logic [AW-1:0]   idx;

  assign idx  = addr[AW+1:2];
  assign dout = mem[idx];

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= din;
  end

  // Only whole, aligned words are stored.
  a_aligned_write: assert property (@(posedge clk) we |-> addr[1:0] == 2'b00)
    else $error("mc_memory: unaligned write to %h", addr);

endmodule
