// tb_mc_reg -- random test of the enabled register against a model,
// including its reset value.
module tb_mc_reg;
  logic        clk = 0, rst_n, en;
  logic [31:0] d, q, model;
  int          checks = 0, failures = 0;

  mc_reg #(.WIDTH(32), .RESET_VAL(32'h0000_0400)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1; d = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    checks++;
    if (q !== 32'h0000_0400) begin failures++; $display("FAIL reset value %h", q); end
    model = 32'h0000_0400;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 2) == 0);
      d  = $urandom;
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h model=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
