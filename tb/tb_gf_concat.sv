// tb_gf_concat: self-checking testbench of gf_concat.
//
// The eight inputs are digit products A*Bi from the reference; the output must be the full carry-less product A*B.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_gf_concat;
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
  logic [7:0][263:0] p;
  logic [2*M-2:0]    c;
  dfe_t              d;
  gf_concat dut (.p(p), .c(c));
  initial begin
    for (int n = 0; n < 40; n++) begin
      fe_t a, b;
      logic [255:0] bx;
      a = rand_fe(); b = rand_fe();
      if (n == 0) b = '1;
      bx = 256'(b);
      for (int i = 0; i < 8; i++) begin
        d = clmul(a, fe_t'(bx[i*32 +: 32]));
        p[i] = d[263:0];
      end
      #1 check(c === clmul(a, b), "concatenated product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
