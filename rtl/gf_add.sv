// gf_add: GF(2^m) adder of the ALU.
//
// Addition of two binary polynomials is a bitwise exclusive-OR, as the
// architecture specifies; the block is purely combinational and its output
// A_out is valid in the same cycle as its operands.
module gf_add #(
  parameter int unsigned M = bec_pkg::M
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] sum
);
  assign sum = a ^ b;
endmodule
