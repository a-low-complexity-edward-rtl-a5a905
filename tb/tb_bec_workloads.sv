// tb_bec_workloads: self-checking testbench of bec_pm_top on the two evaluated curve settings, d = 59 and d = 26.
//
// With d1 = d2 = d the curve constant e = d1^4 + d1^3 + d1^2 d2 equals d^4, so e1 = d and e2 = d^2 (d read as the binary polynomial of the integer). For each d the multiplier must act as a group: w(k2.(k1.P)) computed by feeding the first result back as the base point must equal w((k1*k2).P) computed in one run, with 116-bit k1, k2; both must also match the reference ladder, and every run must take 3396 cycles. The top runs at its default size.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_bec_workloads;
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
  import bec_pkg::M;
  localparam int LAT = 3 + 14*M + 131;
  logic clk = 0, rst = 1, start = 0;
  logic [M-1:0] k;
  fe_t e1, e2, w, x, y, q, w1, z1, w2, z2;
  logic busy, done;

  bec_pm_top dut (.clk(clk), .rst(rst), .start(start), .k(k), .e1(e1), .e2(e2), .w(w),
                  .x(x), .y(y), .busy(busy), .done(done), .q(q),
                  .w1(w1), .z1(z1), .w2(w2), .z2(z2));
  always #5 clk = ~clk;

  task automatic run(logic [M-1:0] key, fe_t base);
    int cyc;
    k = key; w = base; x = base; y = fe_t'(1);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == LAT, $sformatf("latency %0d", cyc));
  endtask

  // product of two 116-bit integers, fits in 232 bits
  function automatic logic [M-1:0] imul(logic [115:0] a, logic [115:0] b);
    return M'(a) * M'(b);
  endfunction

  initial begin
    int dvals [2] = '{59, 26};
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (dvals[n]) begin
      fe_t p0, q1, q2, q12;
      logic [115:0] k1, k2;
      ladder_t s;
      e1 = fe_t'(dvals[n]); e2 = sqr(e1);
      for (int t = 0; t < 2; t++) begin
        p0 = rand_fe();
        k1 = {$urandom(), $urandom(), $urandom(), 20'($urandom())} | (116'(1) << 115);
        k2 = {$urandom(), $urandom(), $urandom(), 20'($urandom())} | 116'(1);
        run(M'(k1), p0);            q1  = q;
        s = ladder(M'(k1), M, e1, e2, p0, p0, fe_t'(1));
        check(q1 === mul(s.w1, inv(s.z1)), "k1.P against the reference ladder");
        run(M'(k2), q1);            q2  = q;
        run(imul(k1, k2), p0);      q12 = q;
        check(q2 === q12, $sformatf("d=%0d: k2.(k1.P) == (k1*k2).P", dvals[n]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
