// gf_concat: concatenation-block of the digit-parallel multiplier.
//
// It takes the NDIG digit products p[i] = A * B_(i+1) (each M+D-1 bits) and
// accumulates them into the full unreduced product of 2M-1 bits by shifting
// product i left by i*D bits and XOR-ing it in. The chain of NDIG-1 XOR arrays
// follows the shift-and-add description of the block. Combinational.
module gf_concat #(
  parameter int unsigned M    = bec_pkg::M,
  parameter int unsigned D    = bec_pkg::DIGIT,
  parameter int unsigned NDIG = bec_pkg::NDIG
) (
  input  logic [NDIG-1:0][M+D-2:0] p,
  output logic [2*M-2:0]           c
);
  // Wide enough for the last shifted product; the bits above 2M-2 are zero
  // because the last digit of B is only M-(NDIG-1)*D bits wide.
  localparam int unsigned W = M + D - 1 + (NDIG - 1) * D;

  logic [W-1:0] acc [NDIG];

  always_comb begin
    acc[0] = W'(p[0]);
    for (int unsigned i = 1; i < NDIG; i++) begin
      acc[i] = acc[i-1] ^ (W'(p[i]) << (i * D));
    end
  end

  assign c = acc[NDIG-1][2*M-2:0];
endmodule
