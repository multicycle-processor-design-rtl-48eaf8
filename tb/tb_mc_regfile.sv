// tb_mc_regfile -- random reads and writes against a model array; checks
// the reset clear and that register 0 stays zero.
module tb_mc_regfile;
  logic        clk = 0, rst_n, we;
  logic [4:0]  aa, ab, aw;
  logic [31:0] da, db, dw;
  logic [31:0] model [32];
  int          checks = 0, failures = 0;

  mc_regfile dut (.clk, .rst_n, .aa, .ab, .da, .db, .we, .aw, .dw);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; aa = 0; ab = 0; aw = 0; dw = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 32; i++) model[i] = 0;
    for (int i = 0; i < 32; i++) begin
      aa = 5'(i); ab = 5'(31 - i); #1;
      checks++;
      if (da !== 0 || db !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int i = 0; i < 5000; i++) begin
      we = ($urandom_range(0, 1) != 0);
      aw = 5'($urandom_range(0, 31));
      dw = $urandom;
      aa = 5'($urandom_range(0, 31));
      ab = 5'($urandom_range(0, 31));
      #1;
      checks++;
      if (da !== model[aa] || db !== model[ab]) begin
        failures++;
        $display("FAIL read r%0d=%h r%0d=%h, expected %h %h", aa, da, ab, db, model[aa], model[ab]);
      end
      @(posedge clk);
      if (we && aw != 0) model[aw] = dw;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
