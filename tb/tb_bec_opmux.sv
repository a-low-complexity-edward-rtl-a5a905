// tb_bec_opmux: self-checking testbench of bec_opmux.
//
// Every select value routes its own random input to the output.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_bec_opmux;
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
  op_sel_e sel;
  fe_t e1, e2, w, x, y, r, o;
  bec_opmux dut (.sel(sel), .e1(e1), .e2(e2), .w(w), .x(x), .y(y), .reg_op(r), .out(o));
  initial begin
    for (int n = 0; n < 20; n++) begin
      e1 = rand_fe(); e2 = rand_fe(); w = rand_fe(); x = rand_fe(); y = rand_fe(); r = rand_fe();
      sel = OPS_E1;  #1 check(o === e1, "e1");
      sel = OPS_E2;  #1 check(o === e2, "e2");
      sel = OPS_W;   #1 check(o === w,  "w");
      sel = OPS_X;   #1 check(o === x,  "x");
      sel = OPS_Y;   #1 check(o === y,  "y");
      sel = OPS_REG; #1 check(o === r,  "reg");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
