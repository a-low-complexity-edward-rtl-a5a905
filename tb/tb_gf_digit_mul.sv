// tb_gf_digit_mul: self-checking testbench of gf_digit_mul.
//
// Random 233-bit operand times random 32-bit digit against a bit-by-bit carry-less product.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_gf_digit_mul;
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
  fe_t         a;
  logic [31:0] b;
  logic [263:0] p;
  dfe_t ref_p;
  gf_digit_mul dut (.a(a), .b(b), .p(p));
  initial begin
    for (int n = 0; n < 100; n++) begin
      a = rand_fe(); b = $urandom();
      if (n == 0) b = 32'h8000_0001;
      if (n == 1) a = '1;
      ref_p = clmul(a, fe_t'(b));
      #1 check(p === ref_p[263:0], "digit product");
      check(ref_p[2*M-2:264] === '0, "reference width");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
