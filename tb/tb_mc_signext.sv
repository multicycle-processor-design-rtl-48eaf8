// tb_mc_signext -- exhaustive test of sign extension and <<2 over all
// 65536 immediates, against integer arithmetic.
module tb_mc_signext;
  logic [15:0] imm16;
  logic [31:0] se, se_shl2;
  int          checks = 0, failures = 0;

  mc_signext dut (.imm16, .se, .se_shl2);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int v;
      v = (i >= 32768) ? i - 65536 : i;
      imm16 = 16'(i);
      #1;
      checks++;
      if (se !== 32'(v) || se_shl2 !== 32'(v * 4)) begin
        failures++;
        if (failures < 10) $display("FAIL imm=%h se=%h shl2=%h", imm16, se, se_shl2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
