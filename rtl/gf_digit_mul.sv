// gf_digit_mul: one of the eight small multipliers of the digit-parallel
// field multiplier (the multiplication-block).
//
// It forms the carry-less (GF(2)[x]) product of the full operand A (m bits)
// and one digit of B (d bits), giving d+m-1 bits, with no reduction. The
// structure, an AND-XOR array written as a sum of shifted copies of A, is this
// design's choice; the architecture fixes only the widths. Combinational.
module gf_digit_mul #(
  parameter int unsigned M = bec_pkg::M,
  parameter int unsigned D = bec_pkg::DIGIT
) (
  input  logic [M-1:0]     a,
  input  logic [D-1:0]     b,
  output logic [M+D-2:0]   p
);
  always_comb begin
    p = '0;
    for (int unsigned j = 0; j < D; j++) begin
      if (b[j]) p = p ^ ({{(D-1){1'b0}}, a} << j);
    end
  end
endmodule
