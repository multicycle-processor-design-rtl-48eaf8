// tb_mc_exc_regs -- checks the three handler addresses (C000_0000,
// C000_0020, C000_0040) and that EPC/Cause load only when we is high.
module tb_mc_exc_regs;
  import mc_pkg::*;

  logic        clk = 0, rst_n, we;
  exc_cause_e  cause_in;
  logic [31:0] pc_in, vector, epc, cause;
  logic [31:0] m_epc, m_cause;
  int          checks = 0, failures = 0;

  mc_exc_regs dut (.clk, .rst_n, .we, .cause_in, .pc_in, .vector, .epc, .cause);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] exp_vec(exc_cause_e c);
    case (c)
      EXC_UNDEF: return 32'hC000_0000;
      EXC_OVF:   return 32'hC000_0020;
      default:   return 32'hC000_0040;
    endcase
  endfunction

  initial begin
    rst_n = 0; we = 0; cause_in = EXC_UNDEF; pc_in = 0;
    @(posedge clk); #1;
    rst_n = 1;
    m_epc = 0; m_cause = 0;
    checks++;
    if (epc !== 0 || cause !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 2000; i++) begin
      we       = ($urandom_range(0, 3) == 0);
      cause_in = exc_cause_e'($urandom_range(0, 2));
      pc_in    = $urandom;
      #1;
      checks++;
      if (vector !== exp_vec(cause_in)) begin
        failures++;
        $display("FAIL vector %h for cause %0d", vector, cause_in);
      end
      @(posedge clk);
      if (we) begin m_epc = pc_in; m_cause = 32'(cause_in); end
      #1;
      checks++;
      if (epc !== m_epc || cause !== m_cause) begin
        failures++;
        $display("FAIL epc=%h cause=%h expected %h %h", epc, cause, m_epc, m_cause);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
