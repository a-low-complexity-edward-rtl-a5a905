// tb_bec_pm_top: self-checking testbench of bec_pm_top, at its default size (233-bit key).
//
// Complete point multiplications: k = 1 must return w(P), k = 2 the closed-form doubling, k = 0 the neutral point, random keys the reference Montgomery ladder (projective points and affine result); scaling the projective base point must not change the affine result; a start pulse during a multiplication must be ignored. Each run must take 3396 cycles. It counts the k = 0 and k = 1 ladder steps, the fourth-power runs of the inversion, the affine conversions and the ignored start pulses, and fails if any never happened.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_bec_pm_top;
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
  int n_k0 = 0, n_k1 = 0, n_quad = 0, n_affine = 0, n_ignored = 0;

  bec_pm_top dut (.clk(clk), .rst(rst), .start(start), .k(k), .e1(e1), .e2(e2), .w(w),
                  .x(x), .y(y), .busy(busy), .done(done), .q(q),
                  .w1(w1), .z1(z1), .w2(w2), .z2(z2));
  always #5 clk = ~clk;

  // mechanism counters, from the control unit's state code
  always @(posedge clk) if (!rst) begin
    if (int'(dut.u_cu.state) == 37) n_k0++;
    if (int'(dut.u_cu.state) == 50) n_k1++;
    if (int'(dut.u_cu.state) == 28) n_quad++;
    if (dut.u_cu.load_q) n_affine++;
  end

  task automatic run(logic [M-1:0] key, fe_t yy, bit poke = 0);
    int cyc;
    k = key; y = yy; x = mul(w, yy);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk); cyc++;
      if (poke && cyc == 1000) begin
        start = 1; k = ~key;
        @(negedge clk) start = 0; k = key; cyc++;
        n_ignored++;
      end
    end
    check(cyc == LAT, $sformatf("latency %0d, expected %0d", cyc, LAT));
  endtask

  initial begin
    ladder_t s;
    fe_t q_a;
    e1 = rand_fe(); e2 = sqr(e1); w = rand_fe();
    repeat (3) @(negedge clk);
    rst = 0;

    run(M'(1), fe_t'(1));
    check(q === w, "1.P = P");
    run(M'(2), fe_t'(1));
    check(q === mul(sqr(w), inv(sqr(sqr(mul(e1, w) ^ fe_t'(1))))), "2.P closed form");
    run('0, rand_fe());
    check(q === '0 && w1 === '0 && z1 !== '0, "0.P is the neutral point");

    for (int n = 0; n < 3; n++) begin
      logic [M-1:0] key;
      fe_t yy;
      key = rand_fe(); yy = rand_fe();
      if (n == 0) key[M-1] = 1'b1;
      run(key, yy, n == 1);
      s = ladder(key, M, e1, e2, w, x, y);
      check(w1 === s.w1 && z1 === s.z1, "(W1:Z1) = k.P");
      check(w2 === s.w2 && z2 === s.z2, "(W2:Z2) = (k+1).P");
      check(q === mul(s.w1, inv(s.z1)), "affine w(k.P)");
      if (n == 2) begin
        q_a = q;
        run(key, rand_fe());
        check(q === q_a, "result independent of the projective scaling of P");
      end
    end

    check(n_k0 > 0,      "k = 0 ladder steps taken");
    check(n_k1 > 0,      "k = 1 ladder steps taken");
    check(n_quad > 0,    "inversion fourth-power runs taken");
    check(n_affine == 7, "one affine conversion per run");
    check(n_ignored > 0, "start during a run ignored");
    $display("steps k=0: %0d  k=1: %0d  quad cycles: %0d  affine: %0d  ignored starts: %0d",
             n_k0, n_k1, n_quad, n_affine, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
