// bec_datapath: data path unit of the point multiplier.
//
// The routing networks MUX1 and MUX2 (selects C4, C5) choose OP_1 and OP_2
// among e1, e2, w, x, y and the register operands OP1 / OP2. The ALU computes
// OP_1 + OP_2, OP_1 * OP_2 and (OP_1 * OP_2)^2 in parallel, and MUX3 (C6)
// picks the one written back to the register file. Purely combinational: an
// instruction reads, computes and writes back within one clock cycle.
module bec_datapath #(
  parameter int unsigned M = bec_pkg::M,
  parameter int unsigned K = bec_pkg::TRI_K,
  parameter int unsigned D = bec_pkg::DIGIT
) (
  input  bec_pkg::op_sel_e  c4,
  input  bec_pkg::op_sel_e  c5,
  input  bec_pkg::res_sel_e c6,
  input  logic [M-1:0]      e1,
  input  logic [M-1:0]      e2,
  input  logic [M-1:0]      w,
  input  logic [M-1:0]      x,
  input  logic [M-1:0]      y,
  input  logic [M-1:0]      op1,
  input  logic [M-1:0]      op2,
  output logic [M-1:0]      wdata
);
  logic [M-1:0] op_1, op_2, a_out, m_out, ms_out;

  bec_opmux #(.M(M)) u_mux1 (.sel(c4), .e1(e1), .e2(e2), .w(w), .x(x), .y(y),
                             .reg_op(op1), .out(op_1));
  bec_opmux #(.M(M)) u_mux2 (.sel(c5), .e1(e1), .e2(e2), .w(w), .x(x), .y(y),
                             .reg_op(op2), .out(op_2));

  bec_alu #(.M(M), .K(K), .D(D)) u_alu (.op_1(op_1), .op_2(op_2),
                                       .a_out(a_out), .m_out(m_out), .ms_out(ms_out));

  bec_resmux #(.M(M)) u_mux3 (.sel(c6), .a_out(a_out), .m_out(m_out),
                              .ms_out(ms_out), .out(wdata));
endmodule
