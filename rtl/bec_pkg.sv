// bec_pkg: shared constants and types of the binary Edwards curve (BEC)
// point multiplier over GF(2^233).
//
// The field size (m = 233), the 32-bit digit of the multiplier, the ten
// register-file cells and the six/three inputs of the routing networks follow
// the architecture description. The reduction trinomial x^233 + x^74 + 1 is
// the NIST B-233/K-233 field polynomial. The binary encodings of the register
// addresses and multiplexer selects are this design's own choice.
package bec_pkg;

  localparam int unsigned M     = 233;  // field size m
  localparam int unsigned TRI_K = 74;   // middle term of x^233 + x^74 + 1
  localparam int unsigned DIGIT = 32;   // digit size of the multiplier
  localparam int unsigned NDIG  = (M + DIGIT - 1) / DIGIT;  // 8 digits

  typedef logic [M-1:0] fe_t;  // one field element

  // Register-file cells (C1/C2 read address, C3 write address).
  typedef enum logic [3:0] {
    R_W1 = 4'd0, R_Z1 = 4'd1, R_W2 = 4'd2, R_Z2 = 4'd3,
    R_W0 = 4'd4, R_Z0 = 4'd5, R_T1 = 4'd6, R_T2 = 4'd7,
    R_T3 = 4'd8, R_T4 = 4'd9
  } reg_addr_e;

  localparam int unsigned NREGS = 10;

  // MUX1 / MUX2 selects (C4 / C5): curve constants, base point or register operand.
  typedef enum logic [2:0] {
    OPS_E1 = 3'd0, OPS_E2 = 3'd1, OPS_W = 3'd2,
    OPS_X  = 3'd3, OPS_Y  = 3'd4, OPS_REG = 3'd5
  } op_sel_e;

  // MUX3 select (C6): adder, multiplier or multiplier followed by squarer.
  typedef enum logic [1:0] {
    RS_ADD = 2'd0, RS_MUL = 2'd1, RS_MSQ = 2'd2
  } res_sel_e;

  // One control word, issued every cycle by the control unit.
  typedef struct packed {
    reg_addr_e c1;   // register read address for OP1
    reg_addr_e c2;   // register read address for OP2
    reg_addr_e c3;   // register write address
    logic      we;   // write enable of the 1x10 demultiplexer
    op_sel_e   c4;   // MUX1 select -> OP_1
    op_sel_e   c5;   // MUX2 select -> OP_2
    res_sel_e  c6;   // MUX3 select -> write-back data
  } ctrl_word_t;

  localparam ctrl_word_t CW_NOP = '{c1: R_W1, c2: R_W1, c3: R_W1, we: 1'b0,
                                    c4: OPS_REG, c5: OPS_REG, c6: RS_ADD};

endpackage
