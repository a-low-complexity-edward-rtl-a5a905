// tb_gf_add: self-checking testbench of gf_add.
//
// Random operands; the sum must equal the bitwise XOR.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_gf_add;
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
  fe_t a, b, s;
  gf_add dut (.a(a), .b(b), .sum(s));
  initial begin
    for (int n = 0; n < 200; n++) begin
      a = rand_fe(); b = rand_fe();
      #1 check(s === (a ^ b), "sum");
      check((s ^ b) === a, "sum - b == a");
    end
    a = rand_fe(); b = a;
    #1 check(s === '0, "a + a == 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
