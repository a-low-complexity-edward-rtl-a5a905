// tb_bec_datapath: self-checking testbench of bec_datapath.
//
// Random selects C4..C6 and operands; the write-back value against the reference routing and arithmetic.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_bec_datapath;
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
  op_sel_e c4, c5;
  res_sel_e c6;
  fe_t e1, e2, w, x, y, op1, op2, wdata;

  bec_datapath dut (.c4(c4), .c5(c5), .c6(c6), .e1(e1), .e2(e2), .w(w), .x(x), .y(y),
                    .op1(op1), .op2(op2), .wdata(wdata));

  function automatic fe_t pick(op_sel_e s, fe_t r);
    case (s)
      OPS_E1: return e1;
      OPS_E2: return e2;
      OPS_W:  return w;
      OPS_X:  return x;
      OPS_Y:  return y;
      default: return r;
    endcase
  endfunction

  initial begin
    fe_t a, b, ex;
    for (int n = 0; n < 300; n++) begin
      e1 = rand_fe(); e2 = rand_fe(); w = rand_fe(); x = rand_fe(); y = rand_fe();
      op1 = rand_fe(); op2 = rand_fe();
      c4 = op_sel_e'($urandom_range(0, 5));
      c5 = op_sel_e'($urandom_range(0, 5));
      c6 = res_sel_e'($urandom_range(0, 2));
      a = pick(c4, op1); b = pick(c5, op2);
      case (c6)
        RS_ADD:  ex = a ^ b;
        RS_MUL:  ex = mul(a, b);
        default: ex = sqr(mul(a, b));
      endcase
      #1 check(wdata === ex, $sformatf("c4=%0d c5=%0d c6=%0d", c4, c5, c6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
