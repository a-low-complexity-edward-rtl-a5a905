// tb_bec_ctrl: self-checking testbench of bec_ctrl.
//
// The control words drive a behavioural register file and ALU built from the reference arithmetic; the ladder points and the affine result must match the reference ladder, the branch taken in the conditional state must follow the key bits MSB first, and start-to-done must take 3 + 14*KEY_BITS + 131 cycles. KEY_BITS is reduced to 16 here.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_bec_ctrl;
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
  localparam int KB = 16;
  logic clk = 0, rst = 1, start = 0;
  logic [KB-1:0] k;
  ctrl_word_t cw;
  logic clr, load_q, busy, done, k_bit, step_start;
  fe_t rf [NREGS];
  fe_t e1, e2, w, x, y, q;
  int  steps0 = 0, steps1 = 0, bitpos;

  bec_ctrl #(.KEY_BITS(KB)) dut (.clk(clk), .rst(rst), .start(start), .k(k), .cw(cw),
    .clr(clr), .load_q(load_q), .busy(busy), .done(done), .k_bit(k_bit),
    .step_start(step_start));
  always #5 clk = ~clk;

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

  // behavioural memory and data path units
  always @(posedge clk) begin
    fe_t a, b, r;
    a = pick(cw.c4, rf[cw.c1]);
    b = pick(cw.c5, rf[cw.c2]);
    case (cw.c6)
      RS_ADD:  r = a ^ b;
      RS_MUL:  r = mul(a, b);
      default: r = sqr(mul(a, b));
    endcase
    if (clr) foreach (rf[i]) rf[i] <= '0;
    else if (cw.we) rf[cw.c3] <= r;
    if (load_q) q <= r;
    if (step_start) begin
      check(k_bit === k[bitpos], "key bit order");
      bitpos--;
    end
  end

  // branch taken after the conditional state
  always @(posedge clk) if (!rst && $past(step_start)) begin
    if ($past(k_bit)) begin steps1++; check(cw.c1 === R_W2, "k=1 step doubles (W2:Z2)"); end
    else              begin steps0++; check(cw.c1 === R_W1, "k=0 step doubles (W1:Z1)"); end
  end

  task automatic run(logic [KB-1:0] key, fe_t yy);
    ladder_t s;
    int cyc;
    k = key; y = yy; x = mul(w, yy);
    bitpos = KB - 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 3 + 14*KB + 131, $sformatf("latency %0d", cyc));
    s = ladder(M'(key), KB, e1, e2, w, x, y);
    check(rf[R_W1] === s.w1 && rf[R_Z1] === s.z1, "(W1:Z1) = k.P");
    check(rf[R_W2] === s.w2 && rf[R_Z2] === s.z2, "(W2:Z2) = (k+1).P");
    check(q === mul(s.w1, inv(s.z1)), "affine w(kP)");
    @(negedge clk) check(!busy && !done, "back to idle");
  endtask

  initial begin
    e1 = rand_fe(); e2 = sqr(e1); w = rand_fe();
    repeat (2) @(negedge clk);
    rst = 0;
    run(16'h0001, fe_t'(1));
    check(q === w, "1.P = P");
    run(16'h8000, rand_fe());
    run(16'($urandom()), rand_fe());
    run(16'($urandom()), rand_fe());
    check(steps0 > 0 && steps1 > 0, "both ladder branches used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
