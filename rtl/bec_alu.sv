// bec_alu: arithmetic logic unit of the point multiplier.
//
// The adder and the digit-parallel multiplier work in parallel on the two
// operands OP_1 and OP_2; the squarer is connected in series after the
// multiplier. All three results are offered every cycle to the result network
// MUX3: A_out = OP_1 + OP_2, M_out = OP_1 * OP_2 and MS_out = (OP_1 * OP_2)^2.
// With OP_1 = OP_2 the last two give a square and a fourth power in one cycle,
// which the quad-block inversion uses. Purely combinational.
module bec_alu #(
  parameter int unsigned M = bec_pkg::M,
  parameter int unsigned K = bec_pkg::TRI_K,
  parameter int unsigned D = bec_pkg::DIGIT
) (
  input  logic [M-1:0] op_1,
  input  logic [M-1:0] op_2,
  output logic [M-1:0] a_out,
  output logic [M-1:0] m_out,
  output logic [M-1:0] ms_out
);
  gf_add    #(.M(M))               u_add (.a(op_1), .b(op_2), .sum(a_out));
  gf_mul_dp #(.M(M), .K(K), .D(D)) u_mul (.a(op_1), .b(op_2), .c(m_out));
  gf_sqr    #(.M(M), .K(K))        u_sqr (.a(m_out), .s(ms_out));
endmodule
