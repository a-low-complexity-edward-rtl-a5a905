// tb_bec_resmux: self-checking testbench of bec_resmux.
//
// Every select value routes its own random input to the output.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_bec_resmux;
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
  import bec_pkg::*;
  res_sel_e sel;
  fe_t a, m, ms, o;
  bec_resmux dut (.sel(sel), .a_out(a), .m_out(m), .ms_out(ms), .out(o));
  initial begin
    for (int n = 0; n < 20; n++) begin
      a = rand_fe(); m = rand_fe(); ms = rand_fe();
      sel = RS_ADD; #1 check(o === a,  "A_out");
      sel = RS_MUL; #1 check(o === m,  "M_out");
      sel = RS_MSQ; #1 check(o === ms, "MS_out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
