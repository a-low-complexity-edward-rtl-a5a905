// tb_gf_reduce: self-checking testbench of gf_reduce.
//
// Random 465-bit polynomials, and single high bits, against a one-bit-at-a-time reduction.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_gf_reduce;
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
  dfe_t c;
  fe_t  r;
  gf_reduce dut (.c(c), .r(r));
  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 2*M-1; i += 32) c[i +: 32] = $urandom();
      #1 check(r === reduce(c), "random reduction");
    end
    for (int i = M; i < 2*M-1; i++) begin
      c = '0; c[i] = 1'b1;
      #1 check(r === reduce(c), "single bit reduction");
    end
    c = '0; c[M] = 1'b1;   // x^233 = x^74 + 1
    #1 check(r === ((fe_t'(1) << K) | fe_t'(1)), "x^233");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
