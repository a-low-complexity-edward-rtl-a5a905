// tb_bec_alu: self-checking testbench of bec_alu.
//
// Random operands; A_out, M_out and MS_out against the reference sum, product and squared product.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_bec_alu;
  import bec_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  fe_t a, b, ao, mo, mso;
  bec_alu dut (.op_1(a), .op_2(b), .a_out(ao), .m_out(mo), .ms_out(mso));
  initial begin
    for (int n = 0; n < 100; n++) begin
      a = rand_fe(); b = (n % 4 == 0) ? a : rand_fe();
      #1;
      check(ao === (a ^ b), "A_out");
      check(mo === mul(a, b), "M_out");
      check(mso === sqr(mul(a, b)), "MS_out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
