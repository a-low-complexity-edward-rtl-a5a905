// tb_gf_sqr: self-checking testbench of gf_sqr.
//
// Random operands against the reference square, and a^(2^233) = a (Frobenius over 233 squarings).
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_gf_sqr;
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
  fe_t a, s;
  gf_sqr dut (.a(a), .s(s));
  initial begin
    fe_t a0;
    for (int n = 0; n < 100; n++) begin
      a = rand_fe();
      #1 check(s === sqr(a), "square");
    end
    a0 = rand_fe(); a = a0;
    for (int i = 0; i < M; i++) #1 a = s;
    #1 check(a === a0, "233 squarings return the input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
