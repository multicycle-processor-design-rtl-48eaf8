// tb_mc_alu -- self-checking test of the ALU.
// Directed corner cases plus random operands; the expected sum/difference,
// Zero and signed overflow are computed with 64-bit signed arithmetic.
module tb_mc_alu;
  import mc_pkg::*;

  logic [31:0] a, b, y;
  alufn_e      fn;
  logic        zero, ovf;
  int          checks = 0, failures = 0;

  mc_alu dut (.a, .b, .fn, .y, .zero, .ovf);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input alufn_e tfn);
    longint sa, sb, s;
    logic [31:0] ey;
    logic        eovf;
    sa = longint'($signed(ta));
    sb = longint'($signed(tb_));
    s  = (tfn == ALU_SUB) ? sa - sb : sa + sb;
    ey = s[31:0];
    eovf = (s > 64'sd2147483647) || (s < -64'sd2147483648);
    a = ta; b = tb_; fn = tfn;
    #1;
    checks++;
    if (y !== ey || zero !== (ey == 0) || ovf !== eovf) begin
      failures++;
      $display("FAIL %h %s %h: y=%h zero=%b ovf=%b, expected %h %b %b",
               ta, tfn.name(), tb_, y, zero, ovf, ey, ey == 0, eovf);
    end
  endtask

  initial begin
    check(32'd5, 32'd4, ALU_ADD);
    check(32'd5, 32'd5, ALU_SUB);
    check(32'h7FFF_FFFF, 32'd1, ALU_ADD);
    check(32'h8000_0000, 32'd1, ALU_SUB);
    check(32'h8000_0000, 32'h8000_0000, ALU_ADD);
    check(32'hFFFF_FFFF, 32'd1, ALU_ADD);
    check(32'd0, 32'h8000_0000, ALU_SUB);
    check(32'd0, 32'd0, ALU_ADD);
    for (int i = 0; i < 20000; i++) begin
      check($urandom, $urandom, ($urandom_range(0, 1) != 0) ? ALU_SUB : ALU_ADD);
      check($urandom_range(0, 7) << 29, $urandom_range(0, 7) << 29,
            ($urandom_range(0, 1) != 0) ? ALU_SUB : ALU_ADD);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
