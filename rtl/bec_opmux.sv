// bec_opmux: 6x1 operand routing network (MUX1 and MUX2 of the data path).
//
// Selects one of the curve constants e1 and e2, the difference-point
// w-coordinate w, the base-point inputs x and y, or the register-file operand.
// Its select is the control signal C4 (MUX1) or C5 (MUX2). Combinational.
module bec_opmux #(
  parameter int unsigned M = bec_pkg::M
) (
  input  bec_pkg::op_sel_e sel,
  input  logic [M-1:0]     e1,
  input  logic [M-1:0]     e2,
  input  logic [M-1:0]     w,
  input  logic [M-1:0]     x,
  input  logic [M-1:0]     y,
  input  logic [M-1:0]     reg_op,
  output logic [M-1:0]     out
);
  import bec_pkg::*;
  always_comb begin
    unique case (sel)
      OPS_E1:  out = e1;
      OPS_E2:  out = e2;
      OPS_W:   out = w;
      OPS_X:   out = x;
      OPS_Y:   out = y;
      OPS_REG: out = reg_op;
      default: out = reg_op;
    endcase
  end
endmodule
