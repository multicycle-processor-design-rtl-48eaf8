// tb_mc_memory -- fills the memory, then mixes random writes and reads
// against a model; checks that the read is combinational and that the
// address wraps every 4*WORDS bytes.
module tb_mc_memory;
  localparam int WORDS = 1024;

  logic        clk = 0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  int          checks = 0, failures = 0;

  mc_memory #(.WORDS(WORDS)) dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; din = 0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      we = 1; addr = 32'(i * 4); din = $urandom; model[i] = din;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 10000; i++) begin
      int w;
      w    = $urandom_range(0, WORDS - 1);
      // random upper bits: the memory decodes only the word index
      addr = {$urandom_range(0, 3) == 0 ? 20'hC0000 : 20'h0, 12'(w * 4)};
      we   = ($urandom_range(0, 3) == 0);
      din  = $urandom;
      #1;
      checks++;
      if (dout !== model[w]) begin
        failures++;
        $display("FAIL read %h = %h, expected %h", addr, dout, model[w]);
      end
      @(negedge clk);
      if (we) model[w] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
