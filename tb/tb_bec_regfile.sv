// tb_bec_regfile: self-checking testbench of bec_regfile.
//
// Random reads and writes against an array model: combinational reads through C1/C2, writes through C3 at the clock edge, clear and reset.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_bec_regfile;
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
  logic clk = 0, rst = 1, clr = 0, we = 0;
  reg_addr_e c1, c2, c3;
  fe_t wdata, op1, op2;
  logic [NREGS-1:0][M-1:0] cells;
  fe_t model [NREGS];

  bec_regfile dut (.clk(clk), .rst(rst), .clr(clr), .c1(c1), .c2(c2), .c3(c3), .we(we),
                   .wdata(wdata), .op1(op1), .op2(op2), .cells(cells));
  always #5 clk = ~clk;

  function automatic reg_addr_e ra();
    return reg_addr_e'($urandom_range(0, NREGS-1));
  endfunction

  initial begin
    c1 = R_W1; c2 = R_W1; c3 = R_W1; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < NREGS; i++) begin
      c1 = reg_addr_e'(i); #1 check(op1 === '0, "reset value");
    end
    for (int n = 0; n < 500; n++) begin
      c1 = ra(); c2 = ra(); c3 = ra(); we = ($urandom_range(0, 3) != 0);
      wdata = rand_fe();
      clr = (n == 250);
      #1;
      check(op1 === model[c1], "OP1 read");
      check(op2 === model[c2], "OP2 read");
      @(posedge clk);
      if (clr) foreach (model[i]) model[i] = '0;
      else if (we) model[c3] = wdata;
      #1;
      for (int i = 0; i < NREGS; i++) check(cells[i] === model[i], "cell contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
