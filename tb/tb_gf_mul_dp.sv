// tb_gf_mul_dp: self-checking testbench of gf_mul_dp.
//
// Random and corner operands against a shift-and-add reference multiplier; also a * 1 = a and commutativity.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_gf_mul_dp;
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
  fe_t a, b, c, ab;
  gf_mul_dp dut (.a(a), .b(b), .c(c));
  initial begin
    for (int n = 0; n < 200; n++) begin
      a = rand_fe(); b = rand_fe();
      if (n == 0) begin a = '1; b = '1; end
      if (n == 1) b = fe_t'(1);
      if (n == 2) b = '0;
      if (n == 3) b = fe_t'(1) << (M-1);
      #1 check(c === mul(a, b), $sformatf("product %0d", n));
      if (n == 1) check(c === a, "a * 1");
    end
    a = rand_fe(); b = rand_fe();
    #1 ab = c;
    {a, b} = {b, a};
    #1 check(c === ab, "commutative");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
