// bec_pm_top: binary Edwards curve point multiplier over GF(2^233).
//
// Computes the w-coordinate of Q = k.P with the Montgomery ladder and the
// differential addition-and-doubling law in single-operation form. Three
// units, as in the architecture: the memory unit (bec_regfile, 10 x 233 bit),
// the data path unit (bec_datapath: MUX1, MUX2, ALU with adder, 32-bit
// digit-parallel multiplier and squarer, MUX3) and the FSM control unit
// (bec_ctrl). One field instruction is executed per clock cycle.
//
// Interface: pulse `start` for one cycle while idle with the key k, the curve
// constants e1 = e^(1/4), e2 = e^(1/2), the affine w-coordinate w = w(P) of
// the base point, and the base point in projective w-coordinates (x : y)
// (x = w, y = 1 is the plain choice; any y != 0 with x = w*y works). All
// inputs must stay stable until `done`. When `done` is high for one cycle,
// q = w(k.P) = W1/Z1 in affine form, and w1, z1, w2, z2 hold the projective
// ladder points (W1:Z1) = k.P and (W2:Z2) = (k+1).P. q keeps its value until
// the next result. Latency: 3 + 14*KEY_BITS + 131 cycles from the start pulse
// to done (3396 cycles for KEY_BITS = 233). Synchronous active-high reset.
module bec_pm_top #(
  parameter int unsigned KEY_BITS = bec_pkg::M
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [KEY_BITS-1:0] k,
  input  logic [bec_pkg::M-1:0] e1,
  input  logic [bec_pkg::M-1:0] e2,
  input  logic [bec_pkg::M-1:0] w,
  input  logic [bec_pkg::M-1:0] x,
  input  logic [bec_pkg::M-1:0] y,
  output logic                busy,
  output logic                done,
  output logic [bec_pkg::M-1:0] q,
  output logic [bec_pkg::M-1:0] w1,
  output logic [bec_pkg::M-1:0] z1,
  output logic [bec_pkg::M-1:0] w2,
  output logic [bec_pkg::M-1:0] z2
);
  import bec_pkg::*;

  ctrl_word_t               cw;
  logic                     clr, load_q;
  fe_t                      op1, op2, wdata;
  logic [NREGS-1:0][M-1:0]  cells;

  bec_ctrl #(.KEY_BITS(KEY_BITS)) u_cu (
    .clk, .rst, .start, .k, .cw, .clr, .load_q, .busy, .done,
    .k_bit(), .step_start()
  );

  bec_regfile u_mu (
    .clk, .rst, .clr, .c1(cw.c1), .c2(cw.c2), .c3(cw.c3), .we(cw.we),
    .wdata, .op1, .op2, .cells
  );

  bec_datapath u_du (
    .c4(cw.c4), .c5(cw.c5), .c6(cw.c6), .e1, .e2, .w, .x, .y,
    .op1, .op2, .wdata
  );

  always_ff @(posedge clk) begin
    if (rst)         q <= '0;
    else if (load_q) q <= wdata;
  end

  assign w1 = cells[R_W1];
  assign z1 = cells[R_Z1];
  assign w2 = cells[R_W2];
  assign z2 = cells[R_Z2];
endmodule
