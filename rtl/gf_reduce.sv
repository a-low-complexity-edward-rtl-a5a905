// gf_reduce: reduction-block, shared by the multiplier and the squarer.
//
// Reduces an unreduced product of 2M-1 bits modulo the trinomial
// x^M + x^K + 1 (x^233 + x^74 + 1 by default, the NIST polynomial). Since
// x^M = x^K + 1, the high half H = c[2M-2:M] folds back as H + H*x^K. That fold
// reaches degree M-2+K, so the bits at M and above are folded once more; for
// K < M/2 the second fold leaves no bits above M-1. This fold form of the NIST
// fast reduction is this design's choice. Combinational.
module gf_reduce #(
  parameter int unsigned M = bec_pkg::M,
  parameter int unsigned K = bec_pkg::TRI_K
) (
  input  logic [2*M-2:0] c,
  output logic [M-1:0]   r
);
  localparam int unsigned W1 = M + K - 1;  // width after the first fold

  logic [M-2:0]  hi;
  logic [W1-1:0] f1;
  logic [K-2:0]  hi2;

  assign hi  = c[2*M-2:M];
  assign f1  = W1'(c[M-1:0]) ^ W1'(hi) ^ (W1'(hi) << K);
  assign hi2 = f1[W1-1:M];
  assign r   = f1[M-1:0] ^ M'(hi2) ^ (M'(hi2) << K);

  if (2 * K >= M) begin : g_bad_k
    $error("gf_reduce: the two-fold reduction needs 2K < M");
  end
endmodule
