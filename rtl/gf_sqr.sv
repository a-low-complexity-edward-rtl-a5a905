// gf_sqr: GF(2^233) squarer.
//
// Squaring a binary polynomial only spreads its bits: bit i of the input
// becomes bit 2i of a 2m-1 bit polynomial with zeros in between. That
// polynomial is reduced by an instance of the same reduction-block the
// multiplier uses. Combinational; in the ALU it sits after the multiplier.
module gf_sqr #(
  parameter int unsigned M = bec_pkg::M,
  parameter int unsigned K = bec_pkg::TRI_K
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] s
);
  logic [2*M-2:0] spread;

  always_comb begin
    spread = '0;
    for (int unsigned i = 0; i < M; i++) spread[2*i] = a[i];
  end

  gf_reduce #(.M(M), .K(K)) u_red (.c(spread), .r(s));
endmodule
