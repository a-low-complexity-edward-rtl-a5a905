// bec_ctrl: FSM control unit of the point multiplier.
//
// Every cycle the FSM issues one control word (C1..C6 plus a write enable),
// so every state executes at most one single-operation field instruction.
// State codes follow the numbering of the architecture description:
//   0        idle; start clears the register file and latches the key k
//   1..3     initialisation: W2 = x, Z2 = y, Z1 = y (W1 = 0 from the clear),
//            i.e. (W1:Z1) is the neutral point and (W2:Z2) = (x:y) = P
//   36       conditional state: counts the ladder step and tests the next key
//            bit (most significant first); k_i = 0 -> 37, k_i = 1 -> 50
//   37..49   the 13 instructions of one ladder step for k_i = 0
//            (double (W1:Z1), add into (W2:Z2))
//   50..62   the same 13 instructions with the roles of the points swapped
//   4..30    Itoh-Tsujii inversion of Z1 with the quad-block method, then
//            the affine result w(kP) = W1 * Z1^-1 (state 30, load_q)
//   63       done for one cycle, then back to 0
// The 13 instructions are the simplified single-operation formulation of the
// differential addition and doubling law; each final coordinate is written
// straight into the cell of the ladder point it replaces, so no copy cycles
// are needed. The order of the multiplication e1*W_p and the squaring T1*T1
// is exchanged against the published list so that W_p is read before it is
// overwritten. In this design the inversion runs after the ladder, where its
// operand Z1 exists, and uses states 4..30 with a repeat counter for the runs
// of fourth powers; the ladder processes all KEY_BITS bits of k.
// Timing: 3 + 14*KEY_BITS + 131 cycles from the start cycle to done
// (3 initialisation, 14 per ladder step, 129 inversion, 1 affine conversion, 1 done).
module bec_ctrl #(
  parameter int unsigned KEY_BITS = bec_pkg::M
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [KEY_BITS-1:0]     k,
  output bec_pkg::ctrl_word_t     cw,
  output logic                    clr,
  output logic                    load_q,
  output logic                    busy,
  output logic                    done,
  output logic                    k_bit,       // key bit of the current ladder step
  output logic                    step_start   // high in the conditional state
);
  import bec_pkg::*;

  typedef enum logic [5:0] {
    S_IDLE  = 6'd0,
    S_INIT1 = 6'd1, S_INIT2 = 6'd2, S_INIT3 = 6'd3,
    // inversion chain beta_i = a^(2^i - 1), a = Z1, beta in T4, scratch in T1
    S_I04 = 6'd4,  S_I05 = 6'd5,  S_I06 = 6'd6,  S_I07 = 6'd7,
    S_I08 = 6'd8,  S_I09 = 6'd9,  S_I10 = 6'd10, S_I11 = 6'd11,
    S_I12 = 6'd12, S_I13 = 6'd13, S_I14 = 6'd14, S_I15 = 6'd15,
    S_I16 = 6'd16, S_I17 = 6'd17, S_I18 = 6'd18, S_I19 = 6'd19,
    S_I20 = 6'd20, S_I21 = 6'd21, S_I22 = 6'd22, S_I23 = 6'd23,
    S_I24 = 6'd24, S_I25 = 6'd25, S_I26 = 6'd26, S_I27 = 6'd27,
    S_I28 = 6'd28, S_I29 = 6'd29, S_OUT = 6'd30,
    S_COND = 6'd36,
    S_A00 = 6'd37, S_A01 = 6'd38, S_A02 = 6'd39, S_A03 = 6'd40, S_A04 = 6'd41,
    S_A05 = 6'd42, S_A06 = 6'd43, S_A07 = 6'd44, S_A08 = 6'd45, S_A09 = 6'd46,
    S_A10 = 6'd47, S_A11 = 6'd48, S_A12 = 6'd49,
    S_B00 = 6'd50, S_B01 = 6'd51, S_B02 = 6'd52, S_B03 = 6'd53, S_B04 = 6'd54,
    S_B05 = 6'd55, S_B06 = 6'd56, S_B07 = 6'd57, S_B08 = 6'd58, S_B09 = 6'd59,
    S_B10 = 6'd60, S_B11 = 6'd61, S_B12 = 6'd62,
    S_DONE = 6'd63
  } state_e;

  localparam int unsigned CW = $clog2(KEY_BITS + 1);

  state_e              state, state_n;
  logic [KEY_BITS-1:0] k_sh;
  logic [CW-1:0]       m_cnt;      // ladder steps started
  logic [5:0]          rep, rep_n; // remaining repeats of a fourth-power run

  // Control word of a register/register or constant/register instruction.
  function automatic ctrl_word_t instr(op_sel_e s1, reg_addr_e a1, op_sel_e s2,
                                       reg_addr_e a2, res_sel_e rs, reg_addr_e dst);
    ctrl_word_t c;
    c.c1 = a1;  c.c2 = a2;  c.c3 = dst;  c.we = 1'b1;
    c.c4 = s1;  c.c5 = s2;  c.c6 = rs;
    return c;
  endfunction

  // One ladder step: P = (wp:zp) is doubled, Q = (wq:zq) becomes P + Q.
  function automatic ctrl_word_t ladder(logic [3:0] step, reg_addr_e wp, reg_addr_e zp,
                                        reg_addr_e wq, reg_addr_e zq);
    unique case (step)
      4'd0:    return instr(OPS_REG, wp,   OPS_REG, zp,   RS_MUL, R_T1); // T1 = Wp*Zp
      4'd1:    return instr(OPS_REG, wp,   OPS_REG, wq,   RS_MUL, R_T2); // T2 = Wp*Wq
      4'd2:    return instr(OPS_REG, zp,   OPS_REG, zq,   RS_MUL, R_T3); // T3 = Zp*Zq
      4'd3:    return instr(OPS_E1,  wp,   OPS_REG, wp,   RS_MUL, R_W0); // W0 = e1*Wp
      4'd4:    return instr(OPS_REG, R_T1, OPS_REG, R_T1, RS_MUL, wp);   // Wd = T1*T1
      4'd5:    return instr(OPS_REG, R_W0, OPS_REG, zp,   RS_ADD, R_Z0); // Z0 = W0+Zp
      4'd6:    return instr(OPS_REG, R_Z0, OPS_REG, R_Z0, RS_MSQ, zp);   // Zd = (Z0*Z0)^2
      4'd7:    return instr(OPS_E2,  R_T2, OPS_REG, R_T2, RS_MUL, R_W0); // W0 = e2*T2
      4'd8:    return instr(OPS_REG, R_W0, OPS_REG, R_T3, RS_ADD, R_Z0); // Z0 = W0+T3
      4'd9:    return instr(OPS_REG, R_Z0, OPS_REG, R_Z0, RS_MUL, zq);   // Za = Z0*Z0
      4'd10:   return instr(OPS_REG, R_T2, OPS_REG, R_T3, RS_MUL, R_Z0); // Z0 = T2*T3
      4'd11:   return instr(OPS_W,   zq,   OPS_REG, zq,   RS_MUL, R_T2); // T2 = w*Za
      4'd12:   return instr(OPS_REG, R_Z0, OPS_REG, R_T2, RS_ADD, wq);   // Wa = Z0+T2
      default: return CW_NOP;
    endcase
  endfunction

  // Length of the fourth-power runs of the inversion (1 for other states).
  function automatic logic [5:0] reps(state_e s);
    unique case (s)
      S_I14:   return 6'd3;
      S_I17:   return 6'd6;
      S_I22:   return 6'd14;
      S_I25:   return 6'd28;
      S_I28:   return 6'd57;
      default: return 6'd1;
    endcase
  endfunction

  // ---------------------------------------------------------------- outputs
  always_comb begin
    cw     = CW_NOP;
    clr    = 1'b0;
    load_q = 1'b0;
    unique case (state)
      S_IDLE:  clr = start;
      S_INIT1: cw = instr(OPS_X, R_T4, OPS_REG, R_T4, RS_ADD, R_W2);  // W2 = x + 0
      S_INIT2: cw = instr(OPS_Y, R_T4, OPS_REG, R_T4, RS_ADD, R_Z2);  // Z2 = y + 0
      S_INIT3: cw = instr(OPS_Y, R_T4, OPS_REG, R_T4, RS_ADD, R_Z1);  // Z1 = y + 0
      // Itoh-Tsujii: beta_{i+j} = beta_i^(2^j) * beta_j
      S_I04: cw = instr(OPS_REG, R_Z1, OPS_REG, R_Z1, RS_MUL, R_T4);  // a^2
      S_I05: cw = instr(OPS_REG, R_T4, OPS_REG, R_Z1, RS_MUL, R_T4);  // beta2
      S_I06: cw = instr(OPS_REG, R_T4, OPS_REG, R_T4, RS_MUL, R_T4);
      S_I07: cw = instr(OPS_REG, R_T4, OPS_REG, R_Z1, RS_MUL, R_T4);  // beta3
      S_I08: cw = instr(OPS_REG, R_T4, OPS_REG, R_T4, RS_MUL, R_T1);  // ^2
      S_I09: cw = instr(OPS_REG, R_T1, OPS_REG, R_T1, RS_MSQ, R_T1);  // ^4
      S_I10: cw = instr(OPS_REG, R_T1, OPS_REG, R_T4, RS_MUL, R_T4);  // beta6
      S_I11: cw = instr(OPS_REG, R_T4, OPS_REG, R_T4, RS_MUL, R_T4);
      S_I12: cw = instr(OPS_REG, R_T4, OPS_REG, R_Z1, RS_MUL, R_T4);  // beta7
      S_I13: cw = instr(OPS_REG, R_T4, OPS_REG, R_T4, RS_MUL, R_T1);  // ^2
      S_I14: cw = instr(OPS_REG, R_T1, OPS_REG, R_T1, RS_MSQ, R_T1);  // (^4)^3
      S_I15: cw = instr(OPS_REG, R_T1, OPS_REG, R_T4, RS_MUL, R_T4);  // beta14
      S_I16: cw = instr(OPS_REG, R_T4, OPS_REG, R_T4, RS_MSQ, R_T1);  // ^4
      S_I17: cw = instr(OPS_REG, R_T1, OPS_REG, R_T1, RS_MSQ, R_T1);  // (^4)^6
      S_I18: cw = instr(OPS_REG, R_T1, OPS_REG, R_T4, RS_MUL, R_T4);  // beta28
      S_I19: cw = instr(OPS_REG, R_T4, OPS_REG, R_T4, RS_MUL, R_T4);
      S_I20: cw = instr(OPS_REG, R_T4, OPS_REG, R_Z1, RS_MUL, R_T4);  // beta29
      S_I21: cw = instr(OPS_REG, R_T4, OPS_REG, R_T4, RS_MUL, R_T1);  // ^2
      S_I22: cw = instr(OPS_REG, R_T1, OPS_REG, R_T1, RS_MSQ, R_T1);  // (^4)^14
      S_I23: cw = instr(OPS_REG, R_T1, OPS_REG, R_T4, RS_MUL, R_T4);  // beta58
      S_I24: cw = instr(OPS_REG, R_T4, OPS_REG, R_T4, RS_MSQ, R_T1);  // ^4
      S_I25: cw = instr(OPS_REG, R_T1, OPS_REG, R_T1, RS_MSQ, R_T1);  // (^4)^28
      S_I26: cw = instr(OPS_REG, R_T1, OPS_REG, R_T4, RS_MUL, R_T4);  // beta116
      S_I27: cw = instr(OPS_REG, R_T4, OPS_REG, R_T4, RS_MSQ, R_T1);  // ^4
      S_I28: cw = instr(OPS_REG, R_T1, OPS_REG, R_T1, RS_MSQ, R_T1);  // (^4)^57
      S_I29: cw = instr(OPS_REG, R_T1, OPS_REG, R_T4, RS_MSQ, R_T4);  // beta232^2 = a^-1
      S_OUT: begin
        cw     = instr(OPS_REG, R_W1, OPS_REG, R_T4, RS_MUL, R_T3);   // w(kP) = W1/Z1
        load_q = 1'b1;
      end
      default: begin
        if (state >= S_A00 && state <= S_A12)
          cw = ladder(4'(state - S_A00), R_W1, R_Z1, R_W2, R_Z2);
        else if (state >= S_B00 && state <= S_B12)
          cw = ladder(4'(state - S_B00), R_W2, R_Z2, R_W1, R_Z1);
      end
    endcase
  end

  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);
  assign k_bit      = k_sh[KEY_BITS-1];
  assign step_start = (state == S_COND);

  // ------------------------------------------------------------- next state
  always_comb begin
    state_n = state;
    rep_n   = rep;
    unique case (state)
      S_IDLE:  if (start) state_n = S_INIT1;
      S_INIT3: state_n = S_COND;
      S_COND:  state_n = k_sh[KEY_BITS-1] ? S_B00 : S_A00;
      S_A12, S_B12: state_n = (32'(m_cnt) == KEY_BITS) ? S_I04 : S_COND;
      S_I14, S_I17, S_I22, S_I25, S_I28:
        if (rep > 6'd1) rep_n = rep - 6'd1;
        else            state_n = state_e'(state + 6'd1);
      S_OUT:   state_n = S_DONE;
      S_DONE:  state_n = S_IDLE;
      default: state_n = state_e'(state + 6'd1);
    endcase
    if (state_n != state) rep_n = reps(state_n);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      rep   <= 6'd1;
      m_cnt <= '0;
      k_sh  <= '0;
    end else begin
      state <= state_n;
      rep   <= rep_n;
      if (state == S_IDLE && start) begin
        k_sh  <= k;
        m_cnt <= '0;
      end else if (state == S_COND) begin
        k_sh  <= k_sh << 1;
        m_cnt <= m_cnt + 1'b1;
      end
    end
  end

  // done lasts one cycle; start is only taken in the idle state.
  assert property (@(posedge clk) disable iff (rst) done |=> !done);
  assert property (@(posedge clk) disable iff (rst) (state == S_COND) |-> 32'(m_cnt) < KEY_BITS);
endmodule
