// gf_mul_dp: 32-bit digit-parallel GF(2^233) multiplier, C = A * B mod f(x).
//
// Four blocks, as in the architecture: the splitter cuts B into NDIG digits
// (B1 = B[31:0] ... B8 = B[232:224], the last one 9 bits, zero-extended here);
// the multiplication-block runs NDIG gf_digit_mul instances in parallel, each
// forming A * Bi; the concatenation-block shifts and XORs the digit products
// into the 2m-1 bit product; the reduction-block folds it modulo
// x^233 + x^74 + 1. The whole multiplier is combinational, so one field
// multiplication completes in one clock cycle of the processor.
module gf_mul_dp #(
  parameter int unsigned M    = bec_pkg::M,
  parameter int unsigned K    = bec_pkg::TRI_K,
  parameter int unsigned D    = bec_pkg::DIGIT,
  parameter int unsigned NDIG = (M + D - 1) / D
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);
  // Splitter-block: B zero-extended to NDIG full digits.
  logic [NDIG*D-1:0]         b_ext;
  logic [NDIG-1:0][D-1:0]    b_dig;
  logic [NDIG-1:0][M+D-2:0]  prod;
  logic [2*M-2:0]            full;

  assign b_ext = (NDIG*D)'(b);
  assign b_dig = b_ext;

  // Multiplication-block.
  for (genvar i = 0; i < NDIG; i++) begin : g_dig
    gf_digit_mul #(.M(M), .D(D)) u_dmul (.a(a), .b(b_dig[i]), .p(prod[i]));
  end

  // Concatenation-block.
  gf_concat #(.M(M), .D(D), .NDIG(NDIG)) u_concat (.p(prod), .c(full));

  // Reduction-block.
  gf_reduce #(.M(M), .K(K)) u_red (.c(full), .r(c));
endmodule
